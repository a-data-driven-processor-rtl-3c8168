// drift_encoder: sparse readout of one drift chamber plane's TDC cards.
//
// `strobe` latches, for each of NCH channels (32-channel cards), a hit flag
// and the 6-bit Gray-coded drift time the TDC recorded (single hit per
// channel). Hit channels then leave one word per clock (25 ns): name =
// cfg_plane, data = {10-bit wire number, 6-bit binary time}, the wire number
// being cfg_wire_base + channel. At most cfg_max_words words are sent; then a
// complete word carries the low 8 bits of the event count. `busy` is high
// from strobe to the complete. Word format, rate, word limit and event count
// follow the original system; turning the Gray time into binary here is
// this design's choice (the TDC front end itself is analog and not built).
module drift_encoder
  import ddp_pkg::*;
#(
  parameter int unsigned NCH = 32
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           strobe,
  input  logic [NCH-1:0] hit,
  input  logic [5:0]     tgray [NCH],
  input  logic [3:0]     cfg_plane,
  input  logic [9:0]     cfg_wire_base,
  input  logic [7:0]     cfg_max_words,
  output logic           busy,
  output word_t          out,
  input  logic           out_hold
);
  localparam int unsigned IW = (NCH > 1) ? $clog2(NCH) : 1;

  logic [5:0]    tq [NCH];
  logic [IW-1:0] idx;
  logic          has, done, pop, can_push, fin, push;
  logic [7:0]    nw, evcnt;
  logic [5:0]    tbin;
  word_t         res;

  sparse_scan #(.N(NCH), .CARD((NCH < 32) ? NCH : 32)) u_scan (.clk, .rst_n,
      .load(strobe && !busy), .hits(hit), .pop, .has, .idx, .done);

  always_comb begin
    for (int k = 0; k < 6; k++) tbin[k] = ^(tq[idx] >> k);
    fin  = busy && (done || nw == cfg_max_words);
    pop  = busy && !fin && has && can_push;
    push = pop || (fin && can_push);
    res  = fin ? mk_cmpl(cfg_plane, {8'd0, evcnt})
               : mk_word(cfg_plane, {cfg_wire_base + 10'(idx), tbin});
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy  <= 1'b0;
      nw    <= '0;
      evcnt <= '0;
    end else if (!busy) begin
      if (strobe) begin
        busy <= 1'b1;
        nw   <= '0;
        tq   <= tgray;
      end
    end else begin
      if (pop) nw <= nw + 1'b1;
      if (fin && can_push) begin
        busy  <= 1'b0;
        evcnt <= evcnt + 1'b1;
      end
    end
  end

  ddp_outreg u_out (.clk, .rst_n, .d(res), .push, .can_push, .out, .out_hold);
endmodule
