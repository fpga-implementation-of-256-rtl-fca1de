// tb_aes256_top: end-to-end testbench for aes256_top at its default sizes.
//
// Drives both engines at once with their own random stream of blocks and
// keys, plus the published vectors, and checks every result against the
// behavioural model in aes_ref_pkg: encryption results, decryption results,
// and a round trip in which each ciphertext the encryption engine produces
// is fed back to the decryption engine with the same key and must return
// the original plaintext. Latencies of 28 (encryption) and 41 (decryption)
// cycles are checked on every operation.
//
// The mechanisms of the design are counted and each must occur at least
// once: encryption, decryption, both engines busy in the same cycle, the
// last round without MixColumns / InvMixColumns, the key reversal buffer
// filling up and draining, round key 14 going straight into the first
// decryption step, a start ignored while busy, and a new start on the
// cycle after done.
module tb_aes256_top;
  import aes_ref_pkg::*;

  int unsigned checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic         rst_n;
  logic         enc_start, enc_done, enc_busy, dec_start, dec_done, dec_busy;
  logic [255:0] enc_key, dec_key;
  logic [127:0] enc_plaintext, enc_ciphertext, dec_ciphertext, dec_plaintext;

  aes256_top dut (
    .clk(clk), .rst_n(rst_n),
    .enc_start(enc_start), .enc_key(enc_key), .enc_plaintext(enc_plaintext),
    .enc_ciphertext(enc_ciphertext), .enc_done(enc_done), .enc_busy(enc_busy),
    .dec_start(dec_start), .dec_key(dec_key), .dec_ciphertext(dec_ciphertext),
    .dec_plaintext(dec_plaintext), .dec_done(dec_done), .dec_busy(dec_busy));

  int unsigned n_enc, n_dec, n_overlap, n_enc_last, n_dec_last, n_kbuf_full, n_kbuf_drained,
               n_key_bypass, n_ignored, n_back_to_back, n_round_trip;

  task automatic check(input logic [127:0] got, input logic [127:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // Mechanism monitors, sampled at every rising edge.
  always @(posedge clk) if (rst_n) begin
    if (enc_busy && dec_busy) n_overlap++;
    if (dut.u_enc.phase_q == dut.u_enc.S_MIX_KEY && dut.u_enc.last_round) n_enc_last++;
    if (dut.u_dec.phase_q == dut.u_dec.S_KEY_MIX && dut.u_dec.last_round) n_dec_last++;
    if (dut.u_dec.kb_full) n_kbuf_full++;
    if (dec_done && dut.u_dec.kb_empty) n_kbuf_drained++;
    if (dut.u_dec.phase_q == dut.u_dec.S_KEYGEN && dut.u_dec.cnt_q == 4'd13) n_key_bypass++;
  end

  // Queue of encryptions whose ciphertext goes back through the decryptor.
  logic [255:0] rt_key [$];
  logic [127:0] rt_pt [$], rt_ct [$];

  localparam logic [255:0] K0 = 256'h000102030405060708090a0b0c0d0e0f101112131415161718191a1b1c1d1e1f;
  localparam logic [127:0] P1 = 128'h5468617473206d79204b756e67204675;
  localparam logic [127:0] C1 = 128'h12605d896ed10cafc9eafcab8911beb9;
  localparam int unsigned N_OPS = 40;

  // Encryption stream.
  task automatic enc_stream();
    for (int n = 0; n < N_OPS; n++) begin
      logic [255:0] k; logic [127:0] p; int cyc;
      k = (n == 0) ? K0 : rand256();
      p = (n == 0) ? P1 : rand128();
      enc_key = k; enc_plaintext = p; enc_start = 1'b1;
      @(posedge clk); #1 enc_start = 1'b0;
      cyc = 0;
      while (!enc_done && cyc < 100) begin
        cyc++;
        if (cyc == 5 && n % 5 == 2) begin           // poke start while busy
          enc_start = 1'b1; enc_plaintext = ~p;
          @(posedge clk); #1 enc_start = 1'b0; enc_plaintext = p;
          n_ignored++;
        end else begin
          @(posedge clk); #1;
        end
      end
      check(128'(cyc), 128'd28, "encryption latency");
      check(enc_ciphertext, encrypt(k, p), $sformatf("encryption %0d", n));
      if (n == 0) check(enc_ciphertext, C1, "encryption of the Kung Fu example");
      n_enc++;
      rt_key.push_back(k); rt_pt.push_back(p); rt_ct.push_back(enc_ciphertext);
      if (n % 3 == 0) repeat ($urandom_range(1, 4)) @(posedge clk);
      else n_back_to_back++;                        // next start right after done
      #1;
    end
  endtask

  // Decryption stream: random ciphertexts and the round trip of the
  // encryption results, alternately.
  task automatic dec_stream();
    for (int n = 0; n < N_OPS; n++) begin
      logic [255:0] k; logic [127:0] c, exp; int cyc; bit rt;
      rt = n % 2 == 1 && rt_ct.size() > 0;
      if (rt) begin
        k = rt_key.pop_front(); c = rt_ct.pop_front(); exp = rt_pt.pop_front();
      end else begin
        k = (n == 0) ? K0 : rand256();
        c = (n == 0) ? C1 : rand128();
        exp = decrypt(k, c);
      end
      dec_key = k; dec_ciphertext = c; dec_start = 1'b1;
      @(posedge clk); #1 dec_start = 1'b0;
      cyc = 0;
      while (!dec_done && cyc < 100) begin
        cyc++;
        if (cyc == 20 && n % 4 == 1) begin
          dec_start = 1'b1; dec_ciphertext = ~c;
          @(posedge clk); #1 dec_start = 1'b0; dec_ciphertext = c;
          n_ignored++;
        end else begin
          @(posedge clk); #1;
        end
      end
      check(128'(cyc), 128'd41, "decryption latency");
      check(dec_plaintext, exp, $sformatf("decryption %0d", n));
      if (n == 0) check(dec_plaintext, P1, "decryption of the Kung Fu example");
      if (rt) n_round_trip++;
      n_dec++;
      if (n % 4 == 3) repeat (2) @(posedge clk);
      else n_back_to_back++;
      #1;
    end
  endtask

  task automatic require(input int unsigned count, input string what);
    checks++;
    $display("  %-40s %0d", what, count);
    if (count == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end
  endtask

  initial begin
    {n_enc, n_dec, n_overlap, n_enc_last, n_dec_last, n_kbuf_full, n_kbuf_drained,
     n_key_bypass, n_ignored, n_back_to_back, n_round_trip} = '0;
    rst_n = 1'b0; enc_start = 1'b0; dec_start = 1'b0;
    enc_key = '0; dec_key = '0; enc_plaintext = '0; dec_ciphertext = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    @(posedge clk); #1;
    fork
      enc_stream();
      dec_stream();
    join
    $display("mechanisms:");
    require(n_enc,          "encryptions");
    require(n_dec,          "decryptions");
    require(n_round_trip,   "round trips (decrypt of own ciphertext)");
    require(n_overlap,      "cycles with both engines busy");
    require(n_enc_last,     "last rounds without MixColumns");
    require(n_dec_last,     "last rounds without InvMixColumns");
    require(n_kbuf_full,    "cycles with key reversal buffer full");
    require(n_kbuf_drained, "key reversal buffer drained at done");
    require(n_key_bypass,   "round key 14 used as produced");
    require(n_ignored,      "starts ignored while busy");
    require(n_back_to_back, "back-to-back starts");
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
