// mwpc_encoder: sparse readout of the MWPC coincidence registers.
//
// `strobe` latches the NWIRES coincidence bits of one wire plane (32-channel
// cards). The hit wires then leave on the processor cable, lowest first, one
// word every second clock (20 MHz of the 40 MHz cable clock): name =
// cfg_crate, data = 10-bit wire number. At most cfg_max_words words are sent;
// then, or when the scan ends, a complete word carries the low 8 bits of the
// event count, which advances. `busy` (the readout busy) is high from strobe
// to the complete. Word rate, format, word limit and event number follow the
// original encoder; the scan order is this design's choice.
module mwpc_encoder
  import ddp_pkg::*;
#(
  parameter int unsigned NWIRES = 1024
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              strobe,
  input  logic [NWIRES-1:0] hits,
  input  logic [3:0]        cfg_crate,
  input  logic [7:0]        cfg_max_words,
  output logic              busy,
  output word_t             out,
  input  logic              out_hold
);
  localparam int unsigned IW = $clog2(NWIRES);

  logic [IW-1:0] idx;
  logic          has, done, pop, can_push, phase, fin, push;
  logic [7:0]    nw, evcnt;
  word_t         res;

  sparse_scan #(.N(NWIRES), .CARD(32)) u_scan (.clk, .rst_n, .load(strobe && !busy), .hits,
                                               .pop, .has, .idx, .done);

  always_comb begin
    fin  = busy && (done || nw == cfg_max_words);
    pop  = busy && !fin && has && phase && can_push;
    push = pop || (fin && can_push);
    res  = fin ? mk_cmpl(cfg_crate, {8'd0, evcnt}) : mk_word(cfg_crate, 16'(idx));
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy  <= 1'b0;
      phase <= 1'b0;
      nw    <= '0;
      evcnt <= '0;
    end else if (!busy) begin
      if (strobe) begin
        busy  <= 1'b1;
        nw    <= '0;
        phase <= 1'b0;
      end
    end else begin
      phase <= !phase;
      if (pop) nw <= nw + 1'b1;
      if (fin && can_push) begin
        busy  <= 1'b0;
        evcnt <= evcnt + 1'b1;
      end
    end
  end

  ddp_outreg u_out (.clk, .rst_n, .d(res), .push, .can_push, .out, .out_hold);
endmodule
