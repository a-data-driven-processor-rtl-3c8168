// ring_buffer: event buffer between one readout segment and the processor.
//
// Words from the readout (complete words end each event) are written into a
// circular memory of DEPTH words. They are offered to the processor on the
// `proc` cable as soon as they are stored, so a new event can be processed
// while older ones wait. The end of each stored event is kept in a queue of
// EVQ entries (the event block counters).
// The read bus carries one command at a time for the earliest stored event:
// read (cmd_read=1) sends that event, its complete included, out on the `ro`
// cable; skip (cmd_read=0) drops it. A command executes in the clock where
// cmd_valid=1 and the shared bus hold cmd_bus_hold=0. Every ring buffer
// drives its own cmd_hold, raised while it is reading out, has no complete
// event, or has not yet passed that whole event to the processor; the bus
// hold is the OR of them, so all buffers act on a command in unison.
// The write port is held when the memory or the event queue is full.
// The roles follow the original ring buffers; sizes, the queue of event ends
// and the hold rule are this design's choices.
module ring_buffer
  import ddp_pkg::*;
#(
  parameter int unsigned DEPTH = 1024,
  parameter int unsigned EVQ   = 16
) (
  input  logic  clk,
  input  logic  rst_n,
  input  word_t wr,
  output logic  wr_hold,
  output word_t proc,
  input  logic  proc_hold,
  output word_t ro,
  input  logic  ro_hold,
  input  logic  cmd_valid,
  input  logic  cmd_read,
  input  logic  cmd_bus_hold,
  output logic  cmd_hold
);
  localparam int unsigned AW = $clog2(DEPTH);
  localparam int unsigned QW = $clog2(EVQ);

  logic [20:0] mem [DEPTH];
  logic [AW:0] wp, pp, ep;
  logic [AW:0] evq [EVQ];
  logic [QW:0] qcnt;
  logic [QW-1:0] qhead, qtail;
  logic        reading, p_can, r_can, exec, wr_take, p_push, r_push, r_last;
  logic [20:0] pw, rw;

  always_comb begin
    wr_take  = wr.valid && (wp - ep) != (AW+1)'(DEPTH) && qcnt != (QW+1)'(EVQ);
    exec     = cmd_valid && !cmd_bus_hold;
    p_push   = p_can && pp != wp;
    pw       = mem[pp[AW-1:0]];
    rw       = mem[ep[AW-1:0]];
    r_push   = reading && r_can;
    r_last   = (ep + 1'b1) == evq[qhead];
  end

  assign cmd_hold = reading || qcnt == 0 || (pp - ep) < (evq[qhead] - ep);
  assign wr_hold  = !wr_take;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wp      <= '0;
      pp      <= '0;
      ep      <= '0;
      qcnt    <= '0;
      qhead   <= '0;
      qtail   <= '0;
      reading <= 1'b0;
    end else begin
      if (wr_take) begin
        mem[wp[AW-1:0]] <= {wr.cmpl, wr.name, wr.data};
        wp              <= wp + 1'b1;
        if (wr.cmpl) begin
          evq[qtail] <= wp + 1'b1;
          qtail      <= qtail + 1'b1;
        end
      end
      if (p_push) pp <= pp + 1'b1;
      if (exec && !cmd_hold) begin
        if (cmd_read) reading <= 1'b1;
        else begin
          ep    <= evq[qhead];
          qhead <= qhead + 1'b1;
        end
      end
      if (r_push) begin
        ep <= ep + 1'b1;
        if (r_last) begin
          reading <= 1'b0;
          qhead   <= qhead + 1'b1;
        end
      end
      qcnt <= qcnt + (QW+1)'(wr_take && wr.cmpl)
                   - (QW+1)'((exec && !cmd_hold && !cmd_read) || (r_push && r_last));
    end
  end

  ddp_outreg u_proc (.clk, .rst_n, .d('{valid: 1'b1, cmpl: pw[20], name: pw[19:16], data: pw[15:0]}),
                     .push(p_push), .can_push(p_can), .out(proc), .out_hold(proc_hold));
  ddp_outreg u_ro (.clk, .rst_n, .d('{valid: 1'b1, cmpl: rw[20], name: rw[19:16], data: rw[15:0]}),
                   .push(r_push), .can_push(r_can), .out(ro), .out_hold(ro_hold));

  a_cmd_unison : assert property (@(posedge clk) disable iff (!rst_n)
                                  (cmd_valid && !cmd_bus_hold) |-> !cmd_hold);
endmodule
