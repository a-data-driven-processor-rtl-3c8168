// ddp_map: associative store of hit positions, read as a road of 9 cells.
//
// There is a one-bit cell for every possible write value (2^CELL_W cells,
// cleared at reset). Write port: a data word sets cell data[CELL_W-1:0] and,
// if that cell was clear, its number goes onto an erase list.
// Read port: the read value holds an integer part data[15:FRAC_W] and a
// fraction data[FRAC_W-1:0]. The nine cells from integer-4 to integer+4
// (cells outside the map read 0) leave as data[15:7], cell integer-4 in bit
// 7, followed by the fraction and zeros, with the read word's name.
// With cfg_wide the optional 16-cell form is used: a read takes two cycles
// and gives two words, first cells integer-8..integer-1, then cells
// integer..integer+7, each as data[15:8] (lowest cell in bit 8) followed by
// the fraction and zeros.
// A read waits: with cfg_ordered (writes arrive in increasing order) until
// the last value written is above the highest cell read (integer+4, or
// integer+7 in the 16-cell form) or the write complete is in; otherwise
// until the write complete is in.
// When both completes are in, the cells on the erase list are cleared, one
// per clock, and the read complete leaves as the output complete; then the
// next block may be written. Behaviour follows the original Map module,
// including its two-cycle 16-cell form; field positions, the split of the
// 16 cells over two words and the erase list size ELIST are this design's
// choices. Latency: one clock per read word.
module ddp_map
  import ddp_pkg::*;
#(
  parameter int unsigned CELL_W = 10,
  parameter int unsigned FRAC_W = 6,
  parameter int unsigned ELIST  = 256
) (
  input  logic  clk,
  input  logic  rst_n,
  input  word_t wr,
  output logic  wr_hold,
  input  word_t rd,
  output logic  rd_hold,
  output word_t out,
  input  logic  out_hold,
  input  logic  cfg_ordered,
  input  logic  cfg_wide
);
  localparam int unsigned NC = 1 << CELL_W;
  localparam int unsigned EW = $clog2(ELIST);

  logic [NC-1:0]     cells;
  logic [CELL_W-1:0] elist [ELIST];
  logic [EW:0]       ecnt;
  logic [CELL_W-1:0] last_wr, wval;
  logic [15-FRAC_W:0] rint;
  logic              wrote, wc_seen, rc_seen, erasing, can_push;
  logic              wr_take, rd_ok, rd_go, rd_take, fin, half;
  logic [8:0]        win;
  logic [15:0]       win16;
  word_t             rc_word, res;

  always_comb begin
    wval = wr.data[CELL_W-1:0];
    rint = rd.data[15:FRAC_W];
    for (int k = 0; k < 9; k++) begin
      int idx;
      idx    = int'(rint) - 4 + k;
      win[k] = (idx >= 0 && idx < int'(NC)) ? cells[idx] : 1'b0;
    end
    for (int k = 0; k < 16; k++) begin
      int idx;
      idx      = int'(rint) - 8 + k;
      win16[k] = (idx >= 0 && idx < int'(NC)) ? cells[idx] : 1'b0;
    end
    wr_take = !erasing && !wc_seen && (is_cmpl(wr) ||
              (is_data(wr) && (cells[wval] || ecnt != (EW+1)'(ELIST))));
    rd_ok   = wc_seen || (cfg_ordered && wrote &&
                          32'(last_wr) > 32'(rint) + (cfg_wide ? 32'd7 : 32'd4));
    rd_go   = !erasing && !rc_seen && is_data(rd) && rd_ok && can_push;
    rd_take = (!erasing && !rc_seen && is_cmpl(rd)) || (rd_go && (!cfg_wide || half));
    fin     = erasing && ecnt == 0;
    if (fin)           res = rc_word;
    else if (cfg_wide) res = mk_word(rd.name, {half ? win16[15:8] : win16[7:0],
                                               rd.data[FRAC_W-1:0], {(8-FRAC_W){1'b0}}});
    else               res = mk_word(rd.name, {win, rd.data[FRAC_W-1:0], {(7-FRAC_W){1'b0}}});
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cells   <= '0;
      ecnt    <= '0;
      wrote   <= 1'b0;
      last_wr <= '0;
      wc_seen <= 1'b0;
      rc_seen <= 1'b0;
      erasing <= 1'b0;
      half    <= 1'b0;
      rc_word <= EMPTY_WORD;
    end else if (erasing) begin
      if (ecnt != 0) begin
        cells[elist[ecnt[EW-1:0] - 1'b1]] <= 1'b0;
        ecnt <= ecnt - 1'b1;
      end else if (can_push) begin
        erasing <= 1'b0;
        wc_seen <= 1'b0;
        rc_seen <= 1'b0;
        wrote   <= 1'b0;
      end
    end else begin
      if (wr_take && is_cmpl(wr)) wc_seen <= 1'b1;
      else if (wr_take) begin
        cells[wval] <= 1'b1;
        wrote       <= 1'b1;
        last_wr     <= wval;
        if (!cells[wval]) begin
          elist[ecnt[EW-1:0]] <= wval;
          ecnt                <= ecnt + 1'b1;
        end
      end
      if (rd_go && cfg_wide) half <= !half;
      if (rd_take && is_cmpl(rd)) begin
        rc_seen <= 1'b1;
        rc_word <= rd;
      end
      if ((wc_seen || (wr_take && is_cmpl(wr))) && (rc_seen || (rd_take && is_cmpl(rd))))
        erasing <= 1'b1;
    end
  end

  assign wr_hold = !wr_take;
  assign rd_hold = !rd_take;

  ddp_outreg u_out (.clk, .rst_n, .d(res),
                    .push(can_push && (fin || rd_go)),
                    .can_push, .out, .out_hold);
endmodule
