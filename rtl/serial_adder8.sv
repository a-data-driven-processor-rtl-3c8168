// serial_adder8: adds up to eight pairs of bit-serial numbers at once.
//
// Companion of the sigma module: results that travel bit-serially, least
// significant bit first, one bit per clock on one wire each, are added pair
// by pair (a[k] + b[k] for k = 0..7) with one carry flip-flop per pair, so
// that linear combinations spread over several sigma modules can be summed.
// `start` marks the least significant bit of a new word and clears the
// carries; sum bit k appears on s[k] one clock after its operand bits.
// The function (eight pairs in parallel, bit-serial) follows the original
// module; LSB-first order and the one-clock output register are this
// design's choices.
module serial_adder8 (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic [7:0] a,
  input  logic [7:0] b,
  output logic [7:0] s
);
  logic [7:0] carry, cin;

  assign cin = start ? 8'h00 : carry;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      carry <= '0;
      s     <= '0;
    end else begin
      s     <= a ^ b ^ cin;
      carry <= (a & b) | (cin & (a ^ b));
    end
  end
endmodule
