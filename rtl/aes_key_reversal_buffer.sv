// aes_key_reversal_buffer: stores round keys and hands them back in reverse.
//
// The inverse cipher needs the round keys last-first, while the key schedule
// produces them first-last. This buffer is a last-in first-out stack: keys
// are pushed as they are generated and the decryption rounds read them from
// the top, popping one per round. It is a register array of DEPTH entries
// with a stack pointer; top is a combinational read of the newest entry.
//
// Interface: push writes wdata at the pointer and raises it; pop lowers it;
// push and pop together replace the top. clear empties the stack. count,
// empty and full report the fill level. Pushing into a full stack or popping
// an empty one is ignored and flagged by an assertion.
module aes_key_reversal_buffer #(
  parameter int unsigned DEPTH = 14,   // round keys 0..13; key 14 is used as it is made
  parameter int unsigned WIDTH = 128
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             push,
  input  logic [WIDTH-1:0] wdata,
  input  logic             pop,
  output logic [WIDTH-1:0] top,
  output logic [$clog2(DEPTH+1)-1:0] count,
  output logic             empty,
  output logic             full
);

  localparam int unsigned PW = $clog2(DEPTH+1);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [PW-1:0]    sp;          // number of keys held
  logic             do_push, do_pop;

  assign empty   = (sp == '0);
  assign full    = (sp == PW'(DEPTH));
  assign do_pop  = pop && !empty;
  assign do_push = push && (!full || do_pop);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sp <= '0;
    end else if (clear) begin
      sp <= '0;
    end else if (do_push && !do_pop) begin
      sp <= sp + PW'(1);
    end else if (do_pop && !do_push) begin
      sp <= sp - PW'(1);
    end
  end

  // Storage needs no reset: an entry is only read after it was written.
  always_ff @(posedge clk) begin
    if (!clear && do_push) begin
      if (do_pop) mem[sp - PW'(1)] <= wdata;
      else        mem[sp]          <= wdata;
    end
  end

  assign top   = empty ? '0 : mem[sp - PW'(1)];
  assign count = sp;

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n)
    (push && !pop && !clear) |-> !full)  else $error("push into full key buffer");
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n)
    (pop && !clear) |-> !empty)          else $error("pop from empty key buffer");

endmodule
