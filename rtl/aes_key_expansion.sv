// aes_key_expansion: iterative AES-256 key schedule, one round key per step.
//
// The 60 words w0..w59 of the expanded key form 15 round keys of four words
// each; round keys 0 and 1 are the 256-bit cipher key itself (w0 = key
// [255:224]). The module holds a sliding window of the last eight words.
// On load the window takes the cipher key. Each advance computes four new
// words from the window,
//   n0 = w[0] ^ T,  n1 = w[1] ^ n0,  n2 = w[2] ^ n1,  n3 = w[3] ^ n2,
// where T is g(w[7]) (rotate, S-box, XOR Rcon) on even steps and only the
// S-box of w[7] on odd steps, and shifts them into the window. The round
// constant for step s is 02^(s/2): 01, 02, 04, ..., 40.
//
// Interface: rk_cur is the newest round key in the window (round key
// step+1); rk_next is the round key the next advance will produce, available
// combinationally in the same cycle, so a user can consume it one cycle
// early. Advances beyond the last round key are ignored (and flagged by an
// assertion). One g-function instance, so four S-boxes.
module aes_key_expansion
  import aes_pkg::*;
#(
  parameter int unsigned NR = aes_pkg::AES_NR  // rounds; 13 advances give round keys 2..14
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic [255:0] key,
  input  logic         advance,
  output logic [127:0] rk_cur,
  output logic [127:0] rk_next,
  output logic [3:0]   step
);

  localparam int unsigned LAST_STEP = NR - 1;  // steps 0..NR-2 produce keys 2..NR

  word_t       win [8];
  word_t       t_word;
  word_t       n   [4];
  logic [7:0]  rcon;
  logic [3:0]  step_q;

  assign rcon = 8'h01 << step_q[3:1];

  aes_g_function u_g (
    .w       (win[7]),
    .rcon    (rcon),
    .use_rot (~step_q[0]),
    .w_out   (t_word)
  );

  always_comb begin
    n[0] = win[0] ^ t_word;
    n[1] = win[1] ^ n[0];
    n[2] = win[2] ^ n[1];
    n[3] = win[3] ^ n[2];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 8; i++) win[i] <= '0;
      step_q <= '0;
    end else if (load) begin
      for (int i = 0; i < 8; i++) win[i] <= key[255-32*i -: 32];
      step_q <= '0;
    end else if (advance && step_q < 4'(LAST_STEP)) begin
      for (int i = 0; i < 4; i++) begin
        win[i]   <= win[i+4];
        win[i+4] <= n[i];
      end
      step_q <= step_q + 4'd1;
    end
  end

  assign rk_cur  = {win[4], win[5], win[6], win[7]};
  assign rk_next = {n[0], n[1], n[2], n[3]};
  assign step    = step_q;

  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n)
    (advance && !load) |-> step_q < 4'(LAST_STEP))
    else $error("key expansion advanced past round key %0d", NR);

endmodule
