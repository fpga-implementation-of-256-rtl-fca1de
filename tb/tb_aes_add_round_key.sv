// tb_aes_add_round_key: self-checking testbench for aes_add_round_key.
//
// Random states and keys; the output must equal their bitwise XOR, and
// applying the same key twice must give the state back.
// Results are compared with the behavioural model in aes_ref_pkg, which
// computes the same transformation from its definition. A watchdog ends the
// run with a failure if it does not finish in time.
module tb_aes_add_round_key;
  import aes_ref_pkg::*;

  int unsigned checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [127:0] state_in, round_key, state_out;
  aes_add_round_key dut (.state_in(state_in), .round_key(round_key), .state_out(state_out));

  task automatic check(input logic [127:0] got, input logic [127:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    for (int n = 0; n < 300; n++) begin
      logic [127:0] exp;
      state_in = rand128(); round_key = rand128();
      exp = 128'h0;
      for (int i = 0; i < 128; i++) exp[i] = state_in[i] != round_key[i];
      @(posedge clk);
      check(state_out, exp, $sformatf("vector %0d", n));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog: testbench did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
