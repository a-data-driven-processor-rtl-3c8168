// associate: names words by the difference between neighbours in a sequence.
//
// The compare field of a word is data >> cfg_shift. For each data word the
// field of the previous data word of the block is subtracted from its own,
// and the difference d is tested against cfg_thr: "associated" means
// d <= cfg_thr, or d > cfg_thr when cfg_gt is set. Associated words get
// cfg_name_assoc, the others cfg_name_single; the first word of a block is
// a single.
// With cfg_pair set (the wire-pair encoder of the drift chambers) the module
// looks one word ahead instead: an associated pair leaves as one word, the
// first one, with the bit just below the compare field set (half a wire
// spacing) and name cfg_name_assoc; a word without a partner leaves as a
// single with that bit clear. Bits below the compare field are cleared in
// pair mode. Complete words pass after any waiting word and start a new block.
// The subtract-and-compare naming follows the original module; the pair rule
// and its half-wire bit position are this design's reading of how it was used.
// Latency: one clock (plus one word of look-ahead in pair mode).
module associate
  import ddp_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  word_t       in,
  output logic        in_hold,
  output word_t       out,
  input  logic        out_hold,
  input  logic [3:0]  cfg_shift,
  input  logic [15:0] cfg_thr,
  input  logic        cfg_gt,
  input  logic        cfg_pair,
  input  logic [3:0]  cfg_name_assoc,
  input  logic [3:0]  cfg_name_single
);
  logic        can_push, prev_v;
  logic [15:0] prev, diff, cur_f, prev_f, low_mask, half;
  logic        assoc, push, take;
  word_t       res;

  always_comb begin
    cur_f    = in.data >> cfg_shift;
    prev_f   = prev >> cfg_shift;
    diff     = cur_f - prev_f;
    assoc    = prev_v && (cfg_gt ? (diff > cfg_thr) : (diff <= cfg_thr));
    low_mask = (16'd1 << cfg_shift) - 16'd1;
    half     = (cfg_shift == 0) ? 16'd0 : (16'd1 << (cfg_shift - 4'd1));
    res      = in;
    push     = 1'b0;
    take     = 1'b0;
    if (!cfg_pair) begin
      push = in.valid;
      take = in.valid;
      if (is_data(in)) res.name = assoc ? cfg_name_assoc : cfg_name_single;
    end else if (is_data(in)) begin
      take = 1'b1;
      push = prev_v;
      res  = mk_word(assoc ? cfg_name_assoc : cfg_name_single,
                     (prev & ~low_mask) | (assoc ? half : 16'd0));
    end else if (is_cmpl(in)) begin
      push = 1'b1;
      take = !prev_v;
      if (prev_v) res = mk_word(cfg_name_single, prev & ~low_mask);
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      prev_v <= 1'b0;
      prev   <= '0;
    end else if (can_push && in.valid) begin
      if (is_cmpl(in)) prev_v <= 1'b0;
      else if (cfg_pair && assoc) prev_v <= 1'b0;
      else begin
        prev_v <= 1'b1;
        prev   <= in.data;
      end
    end
  end

  assign in_hold = !(can_push && take);

  ddp_outreg u_out (.clk, .rst_n, .d(res), .push(push && can_push), .can_push,
                    .out, .out_hold);
endmodule
