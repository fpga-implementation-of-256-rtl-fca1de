// aes_decrypt: iterative AES-256 decryption engine (inverse cipher).
//
// The inverse cipher needs the round keys in reverse order, so a decryption
// runs in two parts. Key part (13 cycles): the key schedule
// (aes_key_expansion) is loaded on the start edge and then advances one
// round key per cycle; round keys 0..13 are pushed into the key reversal
// buffer (a stack) as they appear, and round key 14, the first one the
// inverse cipher needs, goes straight into the initial AddRoundKey on the
// cycle it is produced. Round part (14 rounds x 2 cycles): one inverse
// round datapath is reused,
//   phase A: state <= InvSubBytes(InvShiftRows(state))
//   phase B: state <= InvMixColumns(state ^ top key)    (rounds 1..13)
//            state <= state ^ top key                    (round 14)
// and the top key is popped after every phase B, so the rounds see round
// keys 13, 12, ..., 0. Round keys are used untransformed, with AddRoundKey
// ahead of InvMixColumns. In the terms of the described architecture, the
// initial AddRoundKey is the start permutation, aes_inv_round the round
// permutation looped 14 times, and its last-round mode the final
// permutation.
//
// Timing: 41 clock cycles (13 + 28) from the start edge to the edge after
// which plaintext is valid and done pulses for one cycle. start is ignored
// while busy; the ciphertext is sampled on the start edge. plaintext holds
// the result until the next start. The round order and the 41-cycle latency
// follow the design description; how those cycles are divided and the
// handshake are this implementation's choices.
module aes_decrypt
  import aes_pkg::*;
#(
  parameter int unsigned NR = aes_pkg::AES_NR
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [255:0] key,
  input  logic [127:0] ciphertext,
  output logic [127:0] plaintext,
  output logic         done,
  output logic         busy
);

  localparam int unsigned KEY_CYCLES = NR - 1;   // round keys 2..NR, one per cycle
  localparam int unsigned BW = $clog2(NR + 1);

  typedef enum logic [1:0] {S_IDLE, S_KEYGEN, S_INV_SHIFT_SUB, S_KEY_MIX} phase_e;

  phase_e      phase_q;
  logic [3:0]  cnt_q;      // key cycle in S_KEYGEN, round number afterwards
  block_t      state_q;
  block_t      isb, inv_round_out, start_ark;
  block_t      rk_cur, rk_next, rk_top;
  logic        last_round;
  logic        kx_load, kx_advance;
  logic [3:0]  kx_step;
  logic        kb_push, kb_pop;
  block_t      kb_wdata;
  logic [BW-1:0] kb_count;
  logic        kb_empty, kb_full;

  assign last_round = (cnt_q == 4'(NR));

  // Initial AddRoundKey with round key NR, the look-ahead output of the key
  // schedule during the last key cycle.
  aes_add_round_key u_start_ark (.state_in(state_q), .round_key(rk_next), .state_out(start_ark));

  // Round datapath: isb = phase A result, inv_round_out = phase B result
  // (InvMixColumns left out in the last round).
  aes_inv_round u_round (
    .state_in      (state_q),
    .round_key     (rk_top),
    .last          (last_round),
    .shift_sub_out (isb),
    .key_mix_out   (inv_round_out)
  );

  assign kx_load    = (phase_q == S_IDLE) && start;
  assign kx_advance = (phase_q == S_KEYGEN);

  aes_key_expansion #(.NR(NR)) u_kx (
    .clk     (clk),
    .rst_n   (rst_n),
    .load    (kx_load),
    .key     (key),
    .advance (kx_advance),
    .rk_cur  (rk_cur),
    .rk_next (rk_next),
    .step    (kx_step)
  );

  // Round key 0 comes straight from the key input on the start edge; keys
  // 1..13 are the newest key of the schedule during the key part.
  assign kb_push  = kx_load || (phase_q == S_KEYGEN);
  assign kb_wdata = kx_load ? key[255:128] : rk_cur;
  assign kb_pop   = (phase_q == S_KEY_MIX);

  aes_key_reversal_buffer #(.DEPTH(NR), .WIDTH(128)) u_kbuf (
    .clk   (clk),
    .rst_n (rst_n),
    .clear (1'b0),
    .push  (kb_push),
    .wdata (kb_wdata),
    .pop   (kb_pop),
    .top   (rk_top),
    .count (kb_count),
    .empty (kb_empty),
    .full  (kb_full)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase_q <= S_IDLE;
      cnt_q   <= '0;
      state_q <= '0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (phase_q)
        S_IDLE: if (start) begin
          state_q <= ciphertext;
          cnt_q   <= 4'd1;
          phase_q <= S_KEYGEN;
        end
        S_KEYGEN: begin
          if (cnt_q == 4'(KEY_CYCLES)) begin
            state_q <= start_ark;                // initial AddRoundKey, round key NR
            cnt_q   <= 4'd1;
            phase_q <= S_INV_SHIFT_SUB;
          end else begin
            cnt_q <= cnt_q + 4'd1;
          end
        end
        S_INV_SHIFT_SUB: begin
          state_q <= isb;
          phase_q <= S_KEY_MIX;
        end
        S_KEY_MIX: begin
          state_q <= inv_round_out;
          if (last_round) begin
            phase_q <= S_IDLE;
            done    <= 1'b1;
          end else begin
            cnt_q   <= cnt_q + 4'd1;
            phase_q <= S_INV_SHIFT_SUB;
          end
        end
        default: phase_q <= S_IDLE;
      endcase
    end
  end

  assign plaintext = state_q;
  assign busy      = (phase_q != S_IDLE);

  // The buffer must hold keys 0..NR-1 when the rounds begin, and one fewer
  // after each round.
  a_buffer_filled: assert property (@(posedge clk) disable iff (!rst_n)
    (phase_q == S_INV_SHIFT_SUB) |-> (kb_count == BW'(NR + 1 - cnt_q)))
    else $error("key buffer holds %0d keys in round %0d", kb_count, cnt_q);
  a_key_cycles: assert property (@(posedge clk) disable iff (!rst_n)
    (phase_q == S_KEYGEN) |-> (kx_step == cnt_q - 4'd1))
    else $error("key schedule out of step");
  a_buffer_drained: assert property (@(posedge clk) disable iff (!rst_n)
    done |-> kb_empty && !kb_full)
    else $error("key buffer not empty at the end of a decryption");

endmodule
