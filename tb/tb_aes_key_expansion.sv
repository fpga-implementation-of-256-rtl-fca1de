// tb_aes_key_expansion: self-checking testbench for aes_key_expansion.
//
// For the example key 00..1f and for random keys, the key schedule is loaded
// and advanced 13 times. After the load the current round key must be round
// key 1; before every advance the look-ahead output must already show the
// next round key, and after it the current output and the step count must
// have moved on. Expected round keys come from the word recurrence in
// aes_ref_pkg. Idle cycles without advance must leave the outputs unchanged.
module tb_aes_key_expansion;
  import aes_ref_pkg::*;

  int unsigned checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic         rst_n, load, advance;
  logic [255:0] key;
  logic [127:0] rk_cur, rk_next;
  logic [3:0]   step;

  aes_key_expansion dut (.clk(clk), .rst_n(rst_n), .load(load), .key(key), .advance(advance),
                         .rk_cur(rk_cur), .rk_next(rk_next), .step(step));

  task automatic check(input logic [127:0] got, input logic [127:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic run_key(input logic [255:0] k);
    logic [127:0] rk [15];
    for (int r = 0; r < 15; r++) rk[r] = round_key(k, r);
    key = k; load = 1'b1; advance = 1'b0;
    @(posedge clk); #1 load = 1'b0;
    check(rk_cur, rk[1], "round key 1 after load");
    check(128'(step), 128'd0, "step after load");
    for (int s = 0; s < 13; s++) begin
      check(rk_next, rk[s+2], $sformatf("look-ahead round key %0d", s+2));
      advance = 1'b1;
      @(posedge clk); #1 advance = 1'b0;
      check(rk_cur, rk[s+2], $sformatf("round key %0d", s+2));
      check(128'(step), 128'(s+1), "step count");
      if (s == 5) begin                       // a pause must hold the window
        @(posedge clk); #1;
        check(rk_cur, rk[s+2], "hold without advance");
      end
    end
  endtask

  initial begin
    rst_n = 1'b0; load = 1'b0; advance = 1'b0; key = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    // Example key: round key 2 = a573c29f a176c498 a97fce93 a572c09c
    run_key(256'h000102030405060708090a0b0c0d0e0f101112131415161718191a1b1c1d1e1f);
    check(round_key(256'h000102030405060708090a0b0c0d0e0f101112131415161718191a1b1c1d1e1f, 2),
          128'ha573c29fa176c498a97fce93a572c09c, "reference model round key 2");
    for (int n = 0; n < 20; n++) run_key(rand256());
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
