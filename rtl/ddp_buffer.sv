// ddp_buffer: FIFO that aligns streams between parts of the processor.
//
// DEPTH words (128 in the original module) are stored; a word can be written
// and another read in the same clock. A word is offered at the output
// whenever the buffer is not empty; the input is held only when the buffer is
// full, so holds do not travel upstream as long as the average output rate
// keeps up. The hold to the input is a registered full flag. The output
// register of ddp_outreg adds up to two words of storage. Latency: two clocks
// from an empty buffer.
module ddp_buffer
  import ddp_pkg::*;
#(
  parameter int unsigned DEPTH = 128
) (
  input  logic  clk,
  input  logic  rst_n,
  input  word_t in,
  output logic  in_hold,
  output word_t out,
  input  logic  out_hold
);
  localparam int unsigned AW = $clog2(DEPTH);

  word_t         mem [DEPTH];
  logic [AW-1:0] wp, rp;
  logic [AW:0]   cnt;
  logic          can_push, wr, rd;

  assign in_hold = (cnt == (AW+1)'(DEPTH));
  assign wr      = in.valid && !in_hold;
  assign rd      = (cnt != 0) && can_push;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wp  <= '0;
      rp  <= '0;
      cnt <= '0;
    end else begin
      if (wr) begin
        mem[wp] <= in;
        wp      <= (wp == AW'(DEPTH - 1)) ? '0 : wp + 1'b1;
      end
      if (rd) rp <= (rp == AW'(DEPTH - 1)) ? '0 : rp + 1'b1;
      cnt <= cnt + (AW+1)'(wr) - (AW+1)'(rd);
    end
  end

  ddp_outreg u_out (.clk, .rst_n, .d(mem[rp]), .push(rd), .can_push, .out, .out_hold);
endmodule
