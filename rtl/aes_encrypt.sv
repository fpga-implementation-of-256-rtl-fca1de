// aes_encrypt: iterative AES-256 encryption engine.
//
// One round datapath is reused for all 14 rounds. On the clock edge that
// samples start, the plaintext is XORed with round key 0 (the upper half of
// the key) into the state register and the key schedule is loaded. Each
// round then takes two cycles:
//   phase A: state <= ShiftRows(SubBytes(state))
//   phase B: state <= MixColumns(state) ^ round key r   (rounds 1..13)
//            state <= state ^ round key 14               (round 14)
// and the key schedule (aes_key_expansion) advances by one round key at the
// end of every phase B, so round key r is ready exactly when round r needs
// it and no key storage is required.
//
// Timing: 28 clock cycles (14 rounds x 2) from the start edge to the edge
// after which ciphertext is valid and done pulses for one cycle. start is
// ignored while busy. ciphertext holds the result until the next start.
// The round order and the 28-cycle latency follow the design description;
// the split into two phases per round and the start/busy/done handshake are
// this implementation's choices.
module aes_encrypt
  import aes_pkg::*;
#(
  parameter int unsigned NR = aes_pkg::AES_NR
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [255:0] key,
  input  logic [127:0] plaintext,
  output logic [127:0] ciphertext,
  output logic         done,
  output logic         busy
);

  typedef enum logic [1:0] {S_IDLE, S_SUB_SHIFT, S_MIX_KEY} phase_e;

  phase_e      phase_q;
  logic [3:0]  round_q;
  block_t      state_q;
  block_t      sr, ark;
  block_t      rk;
  logic        last_round;
  logic        kx_load, kx_advance;
  logic [3:0]  kx_step;
  block_t      rk_next_unused;

  assign last_round = (round_q == 4'(NR));

  // Round datapath: sr = phase A result, ark = phase B result.
  aes_round u_round (
    .state_in      (state_q),
    .round_key     (rk),
    .last          (last_round),
    .sub_shift_out (sr),
    .mix_key_out   (ark)
  );

  assign kx_load    = (phase_q == S_IDLE) && start;
  assign kx_advance = (phase_q == S_MIX_KEY) && !last_round;

  aes_key_expansion #(.NR(NR)) u_kx (
    .clk     (clk),
    .rst_n   (rst_n),
    .load    (kx_load),
    .key     (key),
    .advance (kx_advance),
    .rk_cur  (rk),
    .rk_next (rk_next_unused),
    .step    (kx_step)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase_q <= S_IDLE;
      round_q <= '0;
      state_q <= '0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (phase_q)
        S_IDLE: if (start) begin
          state_q <= plaintext ^ key[255:128];   // pre-round AddRoundKey
          round_q <= 4'd1;
          phase_q <= S_SUB_SHIFT;
        end
        S_SUB_SHIFT: begin
          state_q <= sr;
          phase_q <= S_MIX_KEY;
        end
        S_MIX_KEY: begin
          state_q <= ark;
          if (last_round) begin
            phase_q <= S_IDLE;
            done    <= 1'b1;
          end else begin
            round_q <= round_q + 4'd1;
            phase_q <= S_SUB_SHIFT;
          end
        end
        default: phase_q <= S_IDLE;
      endcase
    end
  end

  assign ciphertext = state_q;
  assign busy       = (phase_q != S_IDLE);

  // The key schedule must be one step behind the round counter.
  a_key_in_step: assert property (@(posedge clk) disable iff (!rst_n)
    (phase_q == S_MIX_KEY) |-> (kx_step == round_q - 4'd1))
    else $error("round key out of step with round %0d", round_q);

endmodule
