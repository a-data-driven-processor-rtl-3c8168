// ddp_branch: one cable received by two destinations, each taking a subset
// of the name space.
//
// A data word is sent to out0 if bit `name` of cfg_mask0 is set and to out1
// if bit `name` of cfg_mask1 is set (to both if both are set, to neither if
// none); complete words go to both. A word moves only when every output it
// goes to can take it, so a broadcast stays in step. This models the rule
// that several modules may receive the same cable, each pre-programmed to
// accept part of the name space. Latency: one clock.
module ddp_branch
  import ddp_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  word_t       in,
  output logic        in_hold,
  output word_t       out0,
  input  logic        out0_hold,
  output word_t       out1,
  input  logic        out1_hold,
  input  logic [15:0] cfg_mask0,
  input  logic [15:0] cfg_mask1
);
  logic to0, to1, c0, c1, go;

  always_comb begin
    to0 = in.valid && (in.cmpl || cfg_mask0[in.name]);
    to1 = in.valid && (in.cmpl || cfg_mask1[in.name]);
    go  = in.valid && (!to0 || c0) && (!to1 || c1);
  end

  assign in_hold = !go;

  ddp_outreg u_o0 (.clk, .rst_n, .d(in), .push(go && to0), .can_push(c0), .out(out0),
                   .out_hold(out0_hold));
  ddp_outreg u_o1 (.clk, .rst_n, .d(in), .push(go && to1), .can_push(c1), .out(out1),
                   .out_hold(out1_hold));
endmodule
