// tb_ordered_merge: two sorted random blocks (keys in data[15:6]) are merged;
// the reference is a sort of both with a-first ties (eq_both mode), then a
// second run where equal keys leave once under the special name.
module tb_ordered_merge;
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
    repeat (60000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    finish_tb();
  end

  word_t a, b, out; logic a_hold, b_hold, out_hold; logic eqb;
  word_t exp[$];
  ordered_merge dut (.clk, .rst_n, .a, .a_hold, .b, .b_hold, .out, .out_hold,
                     .cfg_mask(16'hffc0), .cfg_descend(1'b0), .cfg_eq_both(eqb),
                     .cfg_eq_name(4'd9));
  tb_src u_sa (.clk, .rst_n, .out(a), .hold(a_hold));
  tb_src u_sb (.clk, .rst_n, .out(b), .hold(b_hold));
  tb_snk u_snk (.clk, .rst_n, .in(out), .hold(out_hold));
  initial begin
    eqb = 1;
    reset_dut();
    for (int run = 0; run < 4; run++) begin
      logic [9:0] ka[$], kb[$];
      int ia, ib;
      eqb = (run < 2);
      u_snk.got = {}; exp = {};
      ka = {}; kb = {};
      for (int i = 0; i < 20 + run; i++) ka.push_back(10'($urandom_range(60)));
      for (int i = 0; i < 15 + 3 * run; i++) kb.push_back(10'($urandom_range(60)));
      ka.sort(); kb.sort();
      if (!eqb) begin
        // unique keys per side so "equal" means one from each
        ka = ka.unique(); kb = kb.unique();
      end
      foreach (ka[i]) u_sa.push(mk_word(4'd1, {ka[i], 6'(i)}));
      foreach (kb[i]) u_sb.push(mk_word(4'd2, {kb[i], 6'(i)}));
      u_sa.push(mk_cmpl(4'd3, 16'(run))); u_sb.push(mk_cmpl(4'd4, 16'd0));
      ia = 0; ib = 0;
      while (ia < ka.size() || ib < kb.size()) begin
        if (ib >= kb.size() || (ia < ka.size() && ka[ia] < kb[ib])) begin
          exp.push_back(mk_word(4'd1, {ka[ia], 6'(ia)})); ia++;
        end else if (ia >= ka.size() || kb[ib] < ka[ia]) begin
          exp.push_back(mk_word(4'd2, {kb[ib], 6'(ib)})); ib++;
        end else if (eqb) begin
          exp.push_back(mk_word(4'd1, {ka[ia], 6'(ia)})); ia++;
        end else begin
          exp.push_back(mk_word(4'd9, {ka[ia], 6'(ia)})); ia++; ib++;
        end
      end
      exp.push_back(mk_cmpl(4'd3, 16'(run)));
      while (u_snk.got.size() < exp.size()) @(posedge clk);
      cmpq(u_snk.got, exp, $sformatf("merge run %0d", run));
    end
    finish_tb();
  end
endmodule
