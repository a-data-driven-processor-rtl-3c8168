// table_unary: a general function F(X) of one input word, by table lookup.
//
// A patch picks each of the 8 address bits from the 20-bit {name, data}
// field (selector 0-15 data, 16-19 name). The 16-bit table value becomes
// the output data. With cfg_name_from_table set, table bits [15:12] become
// the output name, which turns the table into a test; otherwise the input
// name is kept. Complete words pass unchanged. Table and patch follow the
// original module; using bits [15:12] as the name field is this design's
// choice. Table load port as in the normalizer. Latency: one clock.
module table_unary
  import ddp_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  word_t       in,
  output logic        in_hold,
  output word_t       out,
  input  logic        out_hold,
  input  logic [5:0]  cfg_sel [8],
  input  logic        cfg_name_from_table,
  input  logic        tbl_we,
  input  logic [7:0]  tbl_addr,
  input  logic [15:0] tbl_data
);
  logic [15:0] tbl [256];
  logic        can_push;
  logic [15:0] f;
  word_t       res;

  always_ff @(posedge clk) if (tbl_we) tbl[tbl_addr] <= tbl_data;

  always_comb begin
    f   = tbl[patch8({20'b0, in.name, in.data}, cfg_sel)];
    res = in;
    if (is_data(in)) begin
      res.data = f;
      if (cfg_name_from_table) res.name = f[15:12];
    end
  end

  assign in_hold = !can_push;

  ddp_outreg u_out (.clk, .rst_n, .d(res), .push(in.valid && can_push), .can_push,
                    .out, .out_hold);
endmodule
