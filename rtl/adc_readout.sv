// adc_readout: digital side of the 8-channel ADC readout.
//
// `strobe` latches the eight 8-bit codes delivered by the (analog,
// square-root encoding) converter. A channel is kept only if its code is
// above that channel's digital cut cfg_cut[ch]. Kept channels leave one word
// every second clock (20 MHz): name = cfg_name, data = {5'b0, ch, code};
// then a complete with the low 8 bits of the event count. Channel count,
// code width, per-channel cut and rate follow the original ADC; formats are
// this design's choice.
module adc_readout
  import ddp_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       strobe,
  input  logic [7:0] code [8],
  input  logic [7:0] cfg_cut [8],
  input  logic [3:0] cfg_name,
  output logic       busy,
  output word_t      out,
  input  logic       out_hold
);
  logic [7:0] cq [8];
  logic [7:0] over;
  logic [2:0] idx;
  logic       has, done, pop, can_push, phase, fin, push;
  logic [7:0] evcnt;
  word_t      res;

  sparse_scan #(.N(8), .CARD(8)) u_scan (.clk, .rst_n, .load(strobe && !busy), .hits(over),
                                         .pop, .has, .idx, .done);

  always_comb begin
    for (int k = 0; k < 8; k++) over[k] = code[k] > cfg_cut[k];
    fin  = busy && done;
    pop  = busy && has && phase && can_push;
    push = pop || (fin && can_push);
    res  = fin ? mk_cmpl(cfg_name, {8'd0, evcnt}) : mk_word(cfg_name, {5'd0, idx, cq[idx]});
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy  <= 1'b0;
      phase <= 1'b0;
      evcnt <= '0;
    end else if (!busy) begin
      if (strobe) begin
        busy  <= 1'b1;
        phase <= 1'b0;
        cq    <= code;
      end
    end else begin
      phase <= !phase;
      if (fin && can_push) begin
        busy  <= 1'b0;
        evcnt <= evcnt + 1'b1;
      end
    end
  end

  ddp_outreg u_out (.clk, .rst_n, .d(res), .push, .can_push, .out, .out_hold);
endmodule
