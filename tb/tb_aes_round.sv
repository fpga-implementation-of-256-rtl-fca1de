// tb_aes_round: self-checking testbench for aes_round.
//
// Random states and round keys are applied with last low and high in turn;
// stage A must equal ShiftRows(SubBytes(state)); stage B must equal
// MixColumns(state) ^ key, or state ^ key in the final round.
// Expected values come from the behavioural model in aes_ref_pkg. The test
// also chains the stages over a full 14-round cipher with the key 00..1f
// and checks the published result. A watchdog ends a run that hangs.
module tb_aes_round;
  import aes_ref_pkg::*;

  int unsigned checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [127:0] state_in, round_key, stage_a, stage_b;
  logic         last;

  aes_round dut (.state_in(state_in), .round_key(round_key), .last(last),
    .sub_shift_out(stage_a), .mix_key_out(stage_b));

  task automatic check(input logic [127:0] got, input logic [127:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  localparam logic [255:0] K0 = 256'h000102030405060708090a0b0c0d0e0f101112131415161718191a1b1c1d1e1f;

  initial begin
    for (int n = 0; n < 300; n++) begin
      state_in = rand128(); round_key = rand128(); last = n[0];
      @(posedge clk);
      check(stage_a, shift_rows(sub_bytes(state_in, 0), 0), $sformatf("stage A, vector %0d", n));
      check(stage_b, (last ? state_in : mix_columns(state_in, 0)) ^ round_key, $sformatf("stage B, vector %0d, last=%0d", n, last));
    end
    // a whole encryption through the two stages
    state_in = 128'h00112233445566778899aabbccddeeff ^ aes_ref_pkg::round_key(K0, 0);
    for (int r = 1; r <= 14; r++) begin
      last = (r == 14);
      @(posedge clk);
      state_in = stage_a;
      round_key = aes_ref_pkg::round_key(K0, r);
      @(posedge clk);
      state_in = stage_b;
    end
    check(state_in, 128'h8ea2b7ca516745bfeafc49904b496089, "full cipher");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog: testbench did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
