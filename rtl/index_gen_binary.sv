// index_gen_binary: all index pairs of the cross product of two blocks.
//
// Data words are counted at ports a and b as they arrive (the words
// themselves are not kept). Each time a count grows, the new pairs are sent:
// a new a-element i pairs with every b-element counted so far, a new
// b-element j with every a-element counted so far. So every pair (i, j),
// i < count(a), j < count(b), leaves exactly once, data = {i[7:0], j[7:0]},
// name cfg_name, one pair per clock. Inputs are held only by their completes
// (and at 255 elements); the completes wait until the whole array is sent,
// then one complete (a's) leaves and the counters restart.
// Behaviour follows the original module; the pair format and the row-then-
// column order of generation are this design's choices.
module index_gen_binary
  import ddp_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  word_t      a,
  output logic       a_hold,
  input  word_t      b,
  output logic       b_hold,
  output word_t      out,
  input  logic       out_hold,
  input  logic [3:0] cfg_name
);
  typedef enum logic [1:0] {G_IDLE, G_ROW, G_COL} gmode_e;

  gmode_e     mode;
  logic [7:0] na, nb, ga, gb, p;
  logic       can_push, fin, a_take, b_take, push;
  word_t      res;

  always_comb begin
    fin    = is_cmpl(a) && is_cmpl(b) && mode == G_IDLE && ga == na && gb == nb;
    a_take = (is_data(a) && na != 8'hff) || (fin && can_push);
    b_take = (is_data(b) && nb != 8'hff) || (fin && can_push);
    push   = can_push && (fin || mode != G_IDLE);
    unique case (mode)
      G_ROW:   res = mk_word(cfg_name, {ga, p});
      G_COL:   res = mk_word(cfg_name, {p, gb});
      default: res = a;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n || (fin && can_push)) begin
      mode <= G_IDLE;
      {na, nb, ga, gb, p} <= '0;
    end else begin
      if (is_data(a) && a_take) na <= na + 1'b1;
      if (is_data(b) && b_take) nb <= nb + 1'b1;
      unique case (mode)
        G_IDLE: begin
          p <= '0;
          if (ga != na) begin
            if (gb == 0) ga <= ga + 1'b1;
            else mode <= G_ROW;
          end else if (gb != nb) begin
            if (ga == 0) gb <= gb + 1'b1;
            else mode <= G_COL;
          end
        end
        G_ROW: if (can_push) begin
          p <= p + 1'b1;
          if (p == gb - 1'b1) begin
            ga   <= ga + 1'b1;
            mode <= G_IDLE;
          end
        end
        default: if (can_push) begin
          p <= p + 1'b1;
          if (p == ga - 1'b1) begin
            gb   <= gb + 1'b1;
            mode <= G_IDLE;
          end
        end
      endcase
    end
  end

  assign a_hold = !a_take;
  assign b_hold = !b_take;

  ddp_outreg u_out (.clk, .rst_n, .d(res), .push, .can_push, .out, .out_hold);
endmodule
