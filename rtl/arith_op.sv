// arith_op: two-input arithmetic / logic operator.
//
// When a word waits at both inputs, the operation picked by cfg_op (or, with
// cfg_op_from_name, by a's name bits [2:0]) is applied to the two 16-bit
// values: 0 a+b, 1 a-b, 2 b-a, 3 a&b, 4 a|b, 5 a^b, 6 a, 7 b. The result
// leaves with a's name. Two completes together give one complete. A data
// word facing a complete on the other input is dropped to realign. The
// operation set follows the ALU the original module used; the encoding, the
// output name and the drop rule are this design's choices. Latency: one clock.
module arith_op
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
  input  logic [2:0] cfg_op,
  input  logic       cfg_op_from_name
);
  logic       can_push, both, drop_a, drop_b;
  logic [2:0] op;
  word_t      res;

  always_comb begin
    both   = a.valid && b.valid && (a.cmpl == b.cmpl);
    drop_a = is_data(a) && is_cmpl(b);
    drop_b = is_data(b) && is_cmpl(a);
    op     = cfg_op_from_name ? a.name[2:0] : cfg_op;
    res    = a;
    if (is_data(a)) begin
      unique case (op)
        3'd0: res.data = a.data + b.data;
        3'd1: res.data = a.data - b.data;
        3'd2: res.data = b.data - a.data;
        3'd3: res.data = a.data & b.data;
        3'd4: res.data = a.data | b.data;
        3'd5: res.data = a.data ^ b.data;
        3'd6: res.data = a.data;
        default: res.data = b.data;
      endcase
    end
  end

  assign a_hold = !(drop_a || (both && can_push));
  assign b_hold = !(drop_b || (both && can_push));

  ddp_outreg u_out (.clk, .rst_n, .d(res), .push(both && can_push), .can_push,
                    .out, .out_hold);
endmodule
