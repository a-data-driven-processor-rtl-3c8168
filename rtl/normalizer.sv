// normalizer: F(X1) + G(X2) from two preloaded 256 x 16 tables.
//
// A patch picks, for each of the 8 address bits of each table, one bit of
// the 20-bit {name, data} field of the input word (cfg_sel_hi for the F
// table, cfg_sel_lo for the G table; selector values 0-15 are data bits,
// 16-19 name bits). The two table outputs are added modulo 2^16 and leave
// with the input's name. Patching the 8 high data bits to F and the 8 low to
// G gives a*x+b for a 16-bit x; patching name bits to both tables selects a
// page of normalizations per name. Complete words pass unchanged.
// Tables are written through tbl_we/tbl_sel/tbl_addr/tbl_data (tbl_sel=1 is
// the F table). Table sizes, patch and the sum follow the original module;
// the parallel load port stands in for its serial maintenance bus.
// Latency: one clock.
module normalizer
  import ddp_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  word_t       in,
  output logic        in_hold,
  output word_t       out,
  input  logic        out_hold,
  input  logic [5:0]  cfg_sel_hi [8],
  input  logic [5:0]  cfg_sel_lo [8],
  input  logic        tbl_we,
  input  logic        tbl_sel,
  input  logic [7:0]  tbl_addr,
  input  logic [15:0] tbl_data
);
  logic [15:0] tbl_f [256];
  logic [15:0] tbl_g [256];
  logic        can_push;
  logic [7:0]  a_f, a_g;
  word_t       res;

  always_ff @(posedge clk) begin
    if (tbl_we && tbl_sel)  tbl_f[tbl_addr] <= tbl_data;
    if (tbl_we && !tbl_sel) tbl_g[tbl_addr] <= tbl_data;
  end

  always_comb begin
    a_f = patch8({20'b0, in.name, in.data}, cfg_sel_hi);
    a_g = patch8({20'b0, in.name, in.data}, cfg_sel_lo);
    res = in;
    if (is_data(in)) res.data = tbl_f[a_f] + tbl_g[a_g];
  end

  assign in_hold = !can_push;

  ddp_outreg u_out (.clk, .rst_n, .d(res), .push(in.valid && can_push), .can_push,
                    .out, .out_hold);
endmodule
