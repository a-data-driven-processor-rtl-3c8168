// tb_arith_op: all eight operations on random aligned pairs, the operation
// taken from cfg_op and then from a's name; completes must align.
module tb_arith_op;
  import ddp_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  task automatic chk(input logic ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  task automatic finish_tb();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  task automatic cmpq(input word_t got[$], input word_t exp[$], input string what);
    chk(got.size() == exp.size(), $sformatf("%s: %0d words, expected %0d", what, got.size(), exp.size()));
    for (int i = 0; i < got.size() && i < exp.size(); i++)
      chk(got[i] == exp[i], $sformatf("%s word %0d: got %h expected %h", what, i, got[i], exp[i]));
  endtask

  task automatic reset_dut();
    rst_n = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
  endtask

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    finish_tb();
  end

  word_t a, b, out; logic a_hold, b_hold, out_hold;
  logic [2:0] op; logic opn;
  word_t exp[$];
  arith_op dut (.clk, .rst_n, .a, .a_hold, .b, .b_hold, .out, .out_hold, .cfg_op(op),
                .cfg_op_from_name(opn));
  tb_src u_sa (.clk, .rst_n, .out(a), .hold(a_hold));
  tb_src u_sb (.clk, .rst_n, .out(b), .hold(b_hold));
  tb_snk u_snk (.clk, .rst_n, .in(out), .hold(out_hold));
  function automatic logic [15:0] ref_op(int o, logic [15:0] x, logic [15:0] y);
    case (o)
      0: return x + y;  1: return x - y;  2: return y - x;  3: return x & y;
      4: return x | y;  5: return x ^ y;  6: return x;      default: return y;
    endcase
  endfunction
  initial begin
    op = 0; opn = 0;
    reset_dut();
    for (int o = 0; o < 9; o++) begin
      logic [15:0] x, y;
      op = 3'(o); opn = (o == 8);
      u_snk.got = {}; exp = {};
      for (int i = 0; i < 30; i++) begin
        logic [3:0] nm;
        x = 16'($urandom); y = 16'($urandom); nm = 4'($urandom);
        u_sa.push(mk_word(nm, x)); u_sb.push(mk_word(4'd0, y));
        exp.push_back(mk_word(nm, ref_op(opn ? int'(nm[2:0]) : o, x, y)));
      end
      u_sa.push(mk_cmpl(4'd1, 16'(o))); u_sb.push(mk_cmpl(4'd2, 16'd0));
      exp.push_back(mk_cmpl(4'd1, 16'(o)));
      while (u_snk.got.size() < exp.size()) @(posedge clk);
      cmpq(u_snk.got, exp, $sformatf("op %0d", o));
    end
    finish_tb();
  end
endmodule
