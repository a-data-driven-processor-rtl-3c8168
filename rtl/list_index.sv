// list_index: stores a block of words in arrival order, returns them by index.
//
// Write port: each data word is stored at the next index (0, 1, 2 ...). The
// write complete is held at the write port until the read port's complete
// arrives; the two are then merged into the output complete (read complete's
// name, write complete's data) and the index counter is reset.
// Read port: a data word carries an index in data[IDX_LSB +: 8]; the word
// stored there leaves with the read word's name. A read of an index not yet
// written waits until it is written or the block's write complete is in.
// Behaviour follows the original List/Index module; DEPTH, the index field
// and the waiting rule are this design's choices. Latency: one clock.
module list_index
  import ddp_pkg::*;
#(
  parameter int unsigned DEPTH   = 256,
  parameter int unsigned IDX_LSB = 0
) (
  input  logic  clk,
  input  logic  rst_n,
  input  word_t wr,
  output logic  wr_hold,
  input  word_t rd,
  output logic  rd_hold,
  output word_t out,
  input  logic  out_hold
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [15:0]   mem [DEPTH];
  logic [AW:0]   wcnt;
  logic [AW-1:0] ridx;
  logic          can_push, rd_ok, merge, wr_take, rd_take;
  word_t         res;

  always_comb begin
    ridx    = AW'(rd.data[IDX_LSB +: 8]);
    rd_ok   = is_data(rd) && ((AW+1)'(ridx) < wcnt || is_cmpl(wr));
    merge   = is_cmpl(rd) && is_cmpl(wr);
    wr_take = is_data(wr) && (wcnt != (AW+1)'(DEPTH));
    rd_take = can_push && (rd_ok || merge);
    res     = merge ? mk_cmpl(rd.name, wr.data) : mk_word(rd.name, mem[ridx]);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) wcnt <= '0;
    else if (rd_take && merge) wcnt <= '0;
    else if (wr_take) begin
      mem[wcnt[AW-1:0]] <= wr.data;
      wcnt              <= wcnt + 1'b1;
    end
  end

  assign wr_hold = !(wr_take || (rd_take && merge));
  assign rd_hold = !rd_take;

  ddp_outreg u_out (.clk, .rst_n, .d(res), .push(rd_take), .can_push, .out, .out_hold);
endmodule
