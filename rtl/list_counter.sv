// list_counter: remembers the words sent into a test and returns those that
// pass, closing a processing loop.
//
// Write port: every data word passes to the output. Those named cfg_wr_name
// are also stored at the next write index. The write complete is taken and
// kept; the write port then waits.
// Read port: every data word that comes back is counted; the count is the
// read index. A word named cfg_rd_name (the test passed) retrieves the stored
// word at that index, which leaves with the read word's name. Other read
// words are only counted.
// Once the write complete is in and as many words have been counted at the
// read port as were stored, the output complete (the write complete word) is
// sent and both indices reset. A read-port complete is absorbed.
// Output priority: retrieved word, then the complete, then passthrough.
// The write port is also held while MAX_OUT words are out in the loop and
// not yet back, so that a closed loop cannot fill up and lock. Since no more
// than MAX_OUT (<= DEPTH) stored words are ever waiting for their test, the
// memory is used as a ring: index k lives in word k mod DEPTH, and a block
// may hold up to 2^CNT_W words, far more than DEPTH.
// Behaviour follows the original List/Counter module; the priority order,
// absorbing the read complete, MAX_OUT and the ring use of the memory are
// this design's choices. Latency: one clock.
module list_counter
  import ddp_pkg::*;
#(
  parameter int unsigned DEPTH   = 256,
  parameter int unsigned MAX_OUT = 256,
  parameter int unsigned CNT_W   = 16
) (
  input  logic       clk,
  input  logic       rst_n,
  input  word_t      wr,
  output logic       wr_hold,
  input  word_t      rd,
  output logic       rd_hold,
  output word_t      out,
  input  logic       out_hold,
  input  logic [3:0] cfg_wr_name,
  input  logic [3:0] cfg_rd_name
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [15:0] mem [DEPTH];
  logic [CNT_W-1:0] wcnt, rcnt;
  logic        can_push, wc_seen, retrieve, rd_take, done, wr_take;
  word_t       wc_word, res;

  always_comb begin
    retrieve = is_data(rd) && rd.name == cfg_rd_name;
    rd_take  = (is_data(rd) && (!retrieve || can_push)) || is_cmpl(rd);
    done     = wc_seen && rcnt == wcnt && !(retrieve && can_push);
    wr_take  = !wc_seen && (is_cmpl(wr) ||
               (is_data(wr) && can_push && !retrieve && wcnt != '1 &&
                (wcnt - rcnt) < CNT_W'(MAX_OUT)));
    res      = wr;
    if (retrieve)  res = mk_word(rd.name, mem[rcnt[AW-1:0]]);
    else if (done) res = wc_word;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wcnt    <= '0;
      rcnt    <= '0;
      wc_seen <= 1'b0;
      wc_word <= EMPTY_WORD;
    end else if (done && can_push) begin
      wcnt    <= '0;
      rcnt    <= '0;
      wc_seen <= 1'b0;
    end else begin
      if (is_data(rd) && rd_take) rcnt <= rcnt + 1'b1;
      if (wr_take && is_cmpl(wr)) begin
        wc_seen <= 1'b1;
        wc_word <= wr;
      end else if (wr_take && wr.name == cfg_wr_name) begin
        mem[wcnt[AW-1:0]] <= wr.data;
        wcnt              <= wcnt + 1'b1;
      end
    end
  end

  if (MAX_OUT > DEPTH || MAX_OUT == 0) begin : g_bad_max_out
    $error("list_counter: MAX_OUT must lie between 1 and DEPTH");
  end

  assign wr_hold = !wr_take;
  assign rd_hold = !rd_take || (done && can_push);

  ddp_outreg u_out (.clk, .rst_n, .d(res),
                    .push(can_push && (retrieve || done || (wr_take && is_data(wr)))),
                    .can_push, .out, .out_hold);
endmodule
