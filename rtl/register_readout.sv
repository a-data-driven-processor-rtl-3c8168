// register_readout: unencoded readout of fast coincidence registers.
//
// `strobe` latches NREG 16-bit coincidence registers. All of them leave in
// order, unencoded, one word every second clock (20 MHz), name = cfg_name,
// as a block of fixed size, followed by a complete word with the low 8 bits
// of the event count. Register width, fixed block and rate follow the
// original system; NREG and the formats are this design's choice.
module register_readout
  import ddp_pkg::*;
#(
  parameter int unsigned NREG = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        strobe,
  input  logic [15:0] regs [NREG],
  input  logic [3:0]  cfg_name,
  output logic        busy,
  output word_t       out,
  input  logic        out_hold
);
  localparam int unsigned RW = $clog2(NREG + 1);

  logic [15:0] rq [NREG];
  logic [RW-1:0] r;
  logic        can_push, phase, fin, push;
  logic [7:0]  evcnt;
  word_t       res;

  always_comb begin
    fin  = busy && r == RW'(NREG);
    push = busy && can_push && (fin || phase);
    res  = fin ? mk_cmpl(cfg_name, {8'd0, evcnt})
               : mk_word(cfg_name, rq[r[$clog2(NREG)-1:0]]);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy  <= 1'b0;
      phase <= 1'b0;
      r     <= '0;
      evcnt <= '0;
    end else if (!busy) begin
      if (strobe) begin
        busy  <= 1'b1;
        phase <= 1'b0;
        r     <= '0;
        rq    <= regs;
      end
    end else begin
      phase <= !phase;
      if (push && !fin) r <= r + 1'b1;
      if (push && fin) begin
        busy  <= 1'b0;
        evcnt <= evcnt + 1'b1;
      end
    end
  end

  ddp_outreg u_out (.clk, .rst_n, .d(res), .push, .can_push, .out, .out_hold);
endmodule
