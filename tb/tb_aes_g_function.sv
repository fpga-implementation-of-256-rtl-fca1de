// tb_aes_g_function: self-checking testbench for aes_g_function.
//
// The g step (rotate, S-box, Rcon) and the plain SubWord step are checked
// on random words, plus the first key-schedule step of the standard
// AES-256 example (w7 = 1c1d1e1f, Rcon 01, giving w8 = a573c29f).
// Results are compared with the behavioural model in aes_ref_pkg, which
// computes the same transformation from its definition. A watchdog ends the
// run with a failure if it does not finish in time.
module tb_aes_g_function;
  import aes_ref_pkg::*;

  int unsigned checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [31:0] w, w_out;
  logic [7:0] rcon;
  logic use_rot;
  aes_g_function dut (.w(w), .rcon(rcon), .use_rot(use_rot), .w_out(w_out));

  task automatic check(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    for (int n = 0; n < 400; n++) begin
      w = $urandom; rcon = 8'(1 << (n % 8)); use_rot = n[0];
      @(posedge clk);
      if (use_rot) check(w_out, sub_word({w[23:0], w[31:24]}) ^ {rcon, 24'h0}, $sformatf("g(%h)", w));
      else         check(w_out, sub_word(w), $sformatf("subword(%h)", w));
    end
    // w8 = w0 ^ g(w7) for key 00..1f: w8 = a573c29f
    w = 32'h1c1d1e1f; rcon = 8'h01; use_rot = 1'b1; @(posedge clk);
    check(w_out ^ 32'h00010203, 32'ha573c29f, "w8 of the example key");
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
