// page_gen: copies words of one name a preset number of times.
//
// A data word whose name equals cfg_name leaves cfg_copies times in a row
// (at least once); copy k carries name cfg_name+k so that later modules,
// e.g. a normalizer paged by name, can compute a different function for each
// copy. The input is held until the last copy is sent. Every other word,
// completes included, passes in one cycle. Copying by name follows the
// original module; numbering the copies through the name is this design's
// choice. Latency: one clock per word sent.
module page_gen
  import ddp_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  word_t      in,
  output logic       in_hold,
  output word_t      out,
  input  logic       out_hold,
  input  logic [3:0] cfg_name,
  input  logic [3:0] cfg_copies
);
  logic       can_push, copying, last;
  logic [3:0] k;
  word_t      res;

  always_comb begin
    copying = is_data(in) && in.name == cfg_name;
    last    = !copying || (k + 4'd1 >= cfg_copies);
    res     = in;
    if (copying) res.name = cfg_name + k;
  end

  always_ff @(posedge clk) begin
    if (!rst_n)                           k <= '0;
    else if (in.valid && can_push)        k <= last ? '0 : k + 4'd1;
  end

  assign in_hold = !(can_push && last);

  ddp_outreg u_out (.clk, .rst_n, .d(res), .push(in.valid && can_push), .can_push,
                    .out, .out_hold);
endmodule
