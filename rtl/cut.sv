// cut: names each word by where its value lies against two preset limits.
//
// A data word whose value is below cfg_lo leaves with cfg_name_below, one
// above cfg_hi with cfg_name_above, and one inside [cfg_lo, cfg_hi] with
// cfg_name_in. The value itself is unchanged. Complete words pass unchanged.
// Only a hold on the output cable stops the flow. The three-way naming is
// the original module's; inclusive, unsigned limits are this design's choice.
// Latency: one clock (through ddp_outreg).
module cut
  import ddp_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  word_t       in,
  output logic        in_hold,
  output word_t       out,
  input  logic        out_hold,
  input  logic [15:0] cfg_lo,
  input  logic [15:0] cfg_hi,
  input  logic [3:0]  cfg_name_below,
  input  logic [3:0]  cfg_name_in,
  input  logic [3:0]  cfg_name_above
);
  logic  can_push;
  word_t res;

  always_comb begin
    res = in;
    if (is_data(in)) begin
      if (in.data < cfg_lo)      res.name = cfg_name_below;
      else if (in.data > cfg_hi) res.name = cfg_name_above;
      else                       res.name = cfg_name_in;
    end
  end

  assign in_hold = !can_push;

  ddp_outreg u_out (.clk, .rst_n, .d(res), .push(in.valid && can_push), .can_push,
                    .out, .out_hold);
endmodule
