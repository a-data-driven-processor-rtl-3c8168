// sparse_scan: finds the set bits of a latched hit pattern, lowest first.
//
// `load` copies `hits` (N bits, read as N/CARD cards of CARD channels, the
// way the readout cards sit on their read bus). The scanner then looks at
// one card at a time: while the card has a set bit, `has` is high and `idx`
// names the lowest one; `pop` clears it. An empty card is passed in one
// clock. `done` rises when every card has been passed. Used by the sparse
// readout encoders; the card-by-card scan is this design's choice.
module sparse_scan #(
  parameter int unsigned N    = 1024,
  parameter int unsigned CARD = 32
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 load,
  input  logic [N-1:0]         hits,
  input  logic                 pop,
  output logic                 has,
  output logic [$clog2(N)-1:0] idx,
  output logic                 done
);
  localparam int unsigned NCARD = N / CARD;
  localparam int unsigned CW    = (NCARD > 1) ? $clog2(NCARD) : 1;
  localparam int unsigned LW    = (CARD > 1) ? $clog2(CARD) : 1;

  logic [N-1:0]    pat;
  logic [CW:0]     c;
  logic [CARD-1:0] cur;
  logic [LW-1:0]   low;

  always_comb begin
    cur = (c < (CW+1)'(NCARD)) ? pat[c[CW-1:0]*CARD +: CARD] : '0;
    low = '0;
    for (int k = CARD - 1; k >= 0; k--) if (cur[k]) low = LW'(k);
    has  = |cur;
    done = (c == (CW+1)'(NCARD));
    idx  = $clog2(N)'(c[CW-1:0] * CARD + low);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pat <= '0;
      c   <= (CW+1)'(NCARD);
    end else if (load) begin
      pat <= hits;
      c   <= '0;
    end else if (has) begin
      if (pop) pat[idx] <= 1'b0;
    end else if (!done) c <= c + 1'b1;
  end
endmodule
