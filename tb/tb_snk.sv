// tb_snk: testbench cable sink. Holds the cable in HOLD_PCT percent of the
// cycles at random and records every word it takes in `got`.
module tb_snk
  import ddp_pkg::*;
#(
  parameter int HOLD_PCT = 30
) (
  input  logic  clk,
  input  logic  rst_n,
  input  word_t in,
  output logic  hold
);
  word_t got[$];

  always @(posedge clk) begin
    if (!rst_n) hold <= 1'b0;
    else begin
      if (in.valid && !hold) got.push_back(in);
      hold <= ($urandom_range(99) < HOLD_PCT);
    end
  end
endmodule
