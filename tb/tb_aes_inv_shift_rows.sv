// tb_aes_inv_shift_rows: self-checking testbench for aes_inv_shift_rows.
//
// A state holding bytes 00..0f checks the permutation, then random states.
// Results are compared with the behavioural model in aes_ref_pkg, which
// computes the same transformation from its definition. A watchdog ends the
// run with a failure if it does not finish in time.
module tb_aes_inv_shift_rows;
  import aes_ref_pkg::*;

  int unsigned checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [127:0] state_in, state_out;
  aes_inv_shift_rows dut (.state_in(state_in), .state_out(state_out));

  task automatic check(input logic [127:0] got, input logic [127:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    state_in = 128'h00050a0f04090e03080d02070c01060b; @(posedge clk);
    check(state_out, 128'h000102030405060708090a0b0c0d0e0f, "permutation");
    for (int n = 0; n < 300; n++) begin
      state_in = (n == 0) ? 128'h0 : (n == 1) ? {16{8'hff}} : rand128();
      @(posedge clk);
      check(state_out, shift_rows(state_in, 1), $sformatf("vector %0d in=%h", n, state_in));
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
