// table_binary: a general function F(X1, X2) of two aligned input words.
//
// When a word waits at both inputs, the table is read at an 8-bit address
// patched from the 40 bits {a.name, a.data, b.name, b.data} (selector 0-15
// b.data, 16-19 b.name, 20-35 a.data, 36-39 a.name), both words are taken
// and the result leaves with a's name, or with table bits [15:12] as the name
// when cfg_name_from_table is set. Two completes together give one complete
// (a's). A data word that meets a complete on the other input is dropped, so
// the blocks realign. Latency: one clock.
module table_binary
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
  input  logic [5:0]  cfg_sel [8],
  input  logic        cfg_name_from_table,
  input  logic        tbl_we,
  input  logic [7:0]  tbl_addr,
  input  logic [15:0] tbl_data
);
  logic [15:0] tbl [256];
  logic        can_push, both, drop_a, drop_b;
  logic [15:0] f;
  word_t       res;

  always_ff @(posedge clk) if (tbl_we) tbl[tbl_addr] <= tbl_data;

  always_comb begin
    both   = a.valid && b.valid && (a.cmpl == b.cmpl);
    drop_a = is_data(a) && is_cmpl(b);
    drop_b = is_data(b) && is_cmpl(a);
    f      = tbl[patch8({a.name, a.data, b.name, b.data}, cfg_sel)];
    res    = a;
    if (is_data(a)) begin
      res.data = f;
      if (cfg_name_from_table) res.name = f[15:12];
    end
  end

  assign a_hold = !(drop_a || (both && can_push));
  assign b_hold = !(drop_b || (both && can_push));

  ddp_outreg u_out (.clk, .rst_n, .d(res), .push(both && can_push), .can_push,
                    .out, .out_hold);
endmodule
