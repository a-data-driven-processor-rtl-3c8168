// sigma_module: bit-serial linear combination Y = sum_i A_i * X_i + A_0.
//
// Up to eight variables X_0..X_7 arrive at once, bit-serially, one bit of
// each per clock on the 8-wire input x_bits (bit i belongs to X_i), most
// significant bit first, NBITS bits per word, two's complement; x_start
// marks the first bit. Each clock the eight bits form an address into a
// 256-word table whose entry k is the sum of the A_i for the bits set in k;
// the entry is added to a shifting accumulator (acc = 2*acc + T[k], the
// first, sign-bit step subtracting). After the last bit A_0 (cfg_a0) is
// added and Y leaves on the standard cable, name cfg_name, as bits
// [OUT_LSB +: 16] of the sum, so that fixed-point constants can be scaled.
// The same result, NBITS bits wide, also leaves bit-serially on y_bit, least
// significant bit first, starting the clock after the last input bit
// (y_start marks its first bit), so sigma modules can be cascaded through
// serial adders. One result per NBITS clocks; `res_busy` is high while a result waits for
// the cable, and a new word must not start then.
// Table principle, shifting accumulator and 8-bit address follow the
// original module; MSB-first order, signed inputs, the 32-bit accumulator
// the parallel result cable and the LSB-first serial result are this design's
// choices.
module sigma_module
  import ddp_pkg::*;
#(
  parameter int unsigned NBITS   = 16,
  parameter int unsigned OUT_LSB = 0
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [7:0]  x_bits,
  input  logic        x_start,
  input  logic        tbl_we,
  input  logic [7:0]  tbl_addr,
  input  logic [15:0] tbl_data,
  input  logic [31:0] cfg_a0,
  input  logic [3:0]  cfg_name,
  output logic        res_busy,
  output logic        y_bit,
  output logic        y_start,
  output word_t       out,
  input  logic        out_hold
);
  logic signed [15:0] tbl [256];
  logic signed [31:0] acc, nxt;
  logic [$clog2(NBITS+1)-1:0] bitn;
  logic               run, pend, can_push;
  logic [31:0]        res_q;
  logic [NBITS-1:0]   ser_q;
  logic [$clog2(NBITS+1)-1:0] ser_n;

  always_ff @(posedge clk) if (tbl_we) tbl[tbl_addr] <= tbl_data;

  always_comb begin
    if (x_start) nxt = -32'(tbl[x_bits]);
    else         nxt = (acc <<< 1) + 32'(tbl[x_bits]);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      run  <= 1'b0;
      pend <= 1'b0;
      acc  <= '0;
      bitn <= '0;
    end else begin
      if (x_start || run) begin
        acc  <= nxt;
        bitn <= x_start ? 1 : bitn + 1'b1;
        run  <= 1'b1;
        if (!x_start && bitn == $bits(bitn)'(NBITS - 1)) begin
          run   <= 1'b0;
          pend  <= 1'b1;
          res_q <= nxt + cfg_a0;
        end
      end
      if (pend && can_push && !(run && bitn == $bits(bitn)'(NBITS - 1))) pend <= 1'b0;
    end
  end

  // serial copy of each result, LSB first, for cascading into adders
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ser_n   <= '0;
      y_bit   <= 1'b0;
      y_start <= 1'b0;
    end else if (run && !x_start && bitn == $bits(bitn)'(NBITS - 1)) begin
      {ser_q, y_bit} <= {1'b0, NBITS'(nxt + cfg_a0)};
      y_start        <= 1'b1;
      ser_n          <= $bits(ser_n)'(NBITS - 1);
    end else begin
      y_start <= 1'b0;
      if (ser_n != 0) begin
        {ser_q, y_bit} <= {1'b0, ser_q};
        ser_n          <= ser_n - 1'b1;
      end else y_bit <= 1'b0;
    end
  end

  assign res_busy = pend;

  ddp_outreg u_out (.clk, .rst_n, .d(mk_word(cfg_name, res_q[OUT_LSB +: 16])),
                    .push(pend && can_push), .can_push, .out, .out_hold);
endmodule
