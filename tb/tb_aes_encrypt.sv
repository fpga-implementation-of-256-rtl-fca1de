// tb_aes_encrypt: self-checking testbench for aes_encrypt.
//
// Runs the encryption of known-answer vectors (the AES-256 example of the
// standard, key 00..1f with block 00112233445566778899aabbccddeeff, and the
// key 00..1f with the text "Thats my Kung Fu") and of random keys and blocks,
// comparing with the behavioural model in aes_ref_pkg. Every operation must
// take exactly 28 clock cycles from the start edge to done, and done must
// be a single-cycle pulse. A start pulse while busy must be ignored, a new
// start on the cycle after done must work, and a reset in the middle of an
// operation must return the engine to idle.
module tb_aes_encrypt;
  import aes_ref_pkg::*;

  localparam int unsigned LATENCY = 28;

  int unsigned checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic         rst_n, start, done, busy;
  logic [255:0] key;
  logic [127:0] din, dout;

  aes_encrypt dut (.clk(clk), .rst_n(rst_n), .start(start), .key(key),
    .plaintext(din), .ciphertext(dout), .done(done), .busy(busy));

  task automatic check(input logic [127:0] got, input logic [127:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // Start one operation; optionally pulse start again while busy with other
  // data. Returns after done, having checked result and latency.
  task automatic run(input logic [255:0] k, input logic [127:0] d, input logic [127:0] exp,
                     input bit poke_busy, input string what);
    int cycles = 0;
    key = k; din = d; start = 1'b1;
    @(posedge clk); #1 start = 1'b0;
    check(128'(busy), 128'd1, {what, ": busy after start"});
    while (!done) begin
      cycles++;
      if (poke_busy && cycles == 9) begin
        start = 1'b1; din = ~d; key = ~k;
      end else begin
        start = 1'b0;
      end
      @(posedge clk); #1;
      if (cycles > 200) break;
    end
    start = 1'b0;
    check(128'(cycles), 128'(LATENCY), {what, ": latency"});
    check(dout, exp, what);
    check(128'(busy), 128'd0, {what, ": idle at done"});
    @(posedge clk); #1;
    check(128'(done), 128'd0, {what, ": done is one pulse"});
    check(dout, exp, {what, ": result held"});
  endtask

  localparam logic [255:0] K0 = 256'h000102030405060708090a0b0c0d0e0f101112131415161718191a1b1c1d1e1f;
  localparam logic [127:0] P0 = 128'h00112233445566778899aabbccddeeff;
  localparam logic [127:0] C0 = 128'h8ea2b7ca516745bfeafc49904b496089;
  localparam logic [127:0] P1 = 128'h5468617473206d79204b756e67204675;   // "Thats my Kung Fu"
  localparam logic [127:0] C1 = 128'h12605d896ed10cafc9eafcab8911beb9;

  initial begin
    rst_n = 1'b0; start = 1'b0; key = '0; din = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    check(128'(busy), 128'd0, "idle after reset");
    @(posedge clk); #1;
    // the model must agree with the published answers
    check(encrypt(K0, P0), C0, "model, standard example");
    check(encrypt(K0, P1), C1, "model, Kung Fu example");
    run(K0, P0, C0, 0, "standard example");
    run(K0, P1, C1, 1, "Kung Fu example, start poked while busy");
    for (int n = 0; n < 30; n++) begin
      logic [255:0] k; logic [127:0] d;
      k = rand256(); d = rand128();
      run(k, d, encrypt(k, d), n % 7 == 3, $sformatf("random %0d", n));
    end
    // reset in the middle of an operation
    key = K0; din = P0; start = 1'b1;
    @(posedge clk); #1 start = 1'b0;
    repeat (10) @(posedge clk);
    #1 rst_n = 1'b0;
    #2 rst_n = 1'b1;
    check(128'(busy), 128'd0, "idle after reset mid-operation");
    repeat (LATENCY + 5) begin
      @(posedge clk); #1;
      checks++;
      if (done) begin failures++; $display("FAIL done after reset"); end
    end
    run(K0, P1, C1, 0, "after reset mid-operation");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog: testbench did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
