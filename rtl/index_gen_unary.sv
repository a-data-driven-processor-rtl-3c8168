// index_gen_unary: all unique index pairs of one block with itself.
//
// Data words are counted as they arrive. For each new element i the pairs
// (0,i), (1,i) ... (i-1,i) leave under cfg_pair_name and then the diagonal
// (i,i), the element on its own, under cfg_diag_name; data = {j[7:0], i[7:0]}.
// The input is held only by its complete (and at 255 elements), which leaves
// once all pairs are sent. Behaviour follows the original module; the pair
// format and order are this design's choices. One pair per clock.
module index_gen_unary
  import ddp_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  word_t      in,
  output logic       in_hold,
  output word_t      out,
  input  logic       out_hold,
  input  logic [3:0] cfg_pair_name,
  input  logic [3:0] cfg_diag_name
);
  logic [7:0] n, g, p;
  logic       busy, can_push, fin, take;
  word_t      res;

  always_comb begin
    busy = (g != n);
    fin  = is_cmpl(in) && !busy;
    take = (is_data(in) && n != 8'hff) || (fin && can_push);
    res  = fin ? in : mk_word((p == g) ? cfg_diag_name : cfg_pair_name, {p, g});
  end

  always_ff @(posedge clk) begin
    if (!rst_n || (fin && can_push)) begin
      {n, g, p} <= '0;
    end else begin
      if (is_data(in) && take) n <= n + 1'b1;
      if (busy && can_push) begin
        if (p == g) begin
          g <= g + 1'b1;
          p <= '0;
        end else p <= p + 1'b1;
      end
    end
  end

  assign in_hold = !take;

  ddp_outreg u_out (.clk, .rst_n, .d(res), .push(can_push && (busy || fin)), .can_push,
                    .out, .out_hold);
endmodule
