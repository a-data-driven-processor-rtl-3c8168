// ddp_outreg: the output stage every module drives its cable through.
//
// The hold coming back from the destination is only seen by the output
// register one cycle late, so a second register (the "latch") sits behind
// it. While the latch is empty it is transparent: a pushed word goes straight
// into the output register. If the output register is held, a pushed word is
// caught in the latch and `can_push` drops for the next cycle. Because
// `can_push` comes from a flip-flop the hold is de-skewed at every module
// boundary. An output register that holds no valid word is loaded whatever
// the hold, so empty words swallow holds, as in the original hardware.
//
// Interface: the module core pushes `d` with `push`, only while `can_push`
// is high. `out`/`out_hold` is the cable. Latency: one clock from push to out.
module ddp_outreg
  import ddp_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  word_t d,
  input  logic  push,
  output logic  can_push,
  output word_t out,
  input  logic  out_hold
);
  word_t latch_q;

  assign can_push = !latch_q.valid;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out     <= EMPTY_WORD;
      latch_q <= EMPTY_WORD;
    end else if (!latch_q.valid) begin
      if (!out.valid || !out_hold) out <= push ? d : EMPTY_WORD;
      else if (push)               latch_q <= d;
    end else if (!out_hold) begin
      out     <= latch_q;
      latch_q <= EMPTY_WORD;
    end
  end

  // The core must respect can_push; a push while the latch is full is lost.
  a_no_overrun : assert property (@(posedge clk) disable iff (!rst_n) push |-> can_push);
endmodule
