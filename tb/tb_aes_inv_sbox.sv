// tb_aes_inv_sbox: self-checking testbench for aes_inv_sbox.
//
// All 256 inputs are applied; every output must be the inverse S-box value
// and must map back through the forward S-box definition.
// Results are compared with the behavioural model in aes_ref_pkg, which
// computes the same transformation from its definition. A watchdog ends the
// run with a failure if it does not finish in time.
module tb_aes_inv_sbox;
  import aes_ref_pkg::*;

  int unsigned checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [7:0] in, out;
  aes_inv_sbox dut (.in(in), .out(out));

  task automatic check(input logic [7:0] got, input logic [7:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    for (int x = 0; x < 256; x++) begin
      in = 8'(x); @(posedge clk);
      check(sbox(out), 8'(x), $sformatf("sbox(inv_sbox[%02h])", x));
    end
    in = 8'h00; #1 check(out, 8'h52, "inv_sbox[00]");
    in = 8'h63; #1 check(out, 8'h00, "inv_sbox[63]");
    in = 8'hff; #1 check(out, 8'h7d, "inv_sbox[ff]");
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
