// ordered_merge: merges two ordered blocks into one ordered block.
//
// The keys are the data bits selected by cfg_mask. Of the two waiting data
// words the smaller key leaves first (the larger with cfg_descend) and the
// other waits. On equal keys, with cfg_eq_both clear one word leaves, a's,
// under cfg_eq_name and both inputs are taken; with cfg_eq_both set both
// leave in turn with their own names, a's first. Once one input shows its
// complete, the other input drains; the two completes then give one (a's).
// A word can only leave when both inputs show a word, since until then the
// order is unknown. This follows the original module; the key mask register
// stands in for its selectable compare field. Latency: one clock.
module ordered_merge
  import ddp_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  word_t       a,
  output logic        a_hold,
  input  word_t       b,
  output logic        b_hold,
  output word_t       out,
  input  logic        out_hold,
  input  logic [15:0] cfg_mask,
  input  logic        cfg_descend,
  input  logic        cfg_eq_both,
  input  logic [3:0]  cfg_eq_name
);
  logic        can_push, take_a, take_b, a_first;
  logic [15:0] ka, kb;
  word_t       res;

  always_comb begin
    ka      = a.data & cfg_mask;
    kb      = b.data & cfg_mask;
    a_first = cfg_descend ? (ka > kb) : (ka < kb);
    take_a  = 1'b0;
    take_b  = 1'b0;
    res     = a;
    if (a.valid && b.valid) begin
      if (is_cmpl(a) && is_cmpl(b)) begin
        take_a = 1'b1;
        take_b = 1'b1;
      end else if (is_cmpl(a)) begin
        take_b = 1'b1;
        res    = b;
      end else if (is_cmpl(b)) begin
        take_a = 1'b1;
      end else if (ka == kb) begin
        take_a = 1'b1;
        if (!cfg_eq_both) begin
          take_b   = 1'b1;
          res.name = cfg_eq_name;
        end
      end else if (a_first) begin
        take_a = 1'b1;
      end else begin
        take_b = 1'b1;
        res    = b;
      end
    end
  end

  assign a_hold = !(can_push && take_a);
  assign b_hold = !(can_push && take_b);

  ddp_outreg u_out (.clk, .rst_n, .d(res), .push(can_push && (take_a || take_b)),
                    .can_push, .out, .out_hold);
endmodule
