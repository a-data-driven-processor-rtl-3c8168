// tb_index_gen_unary: for a block of n words the output must be every pair
// j<i (name 8) and every diagonal (i,i) (name 9), each once, then the
// complete.
module tb_index_gen_unary;
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
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    finish_tb();
  end

  word_t in, out; logic in_hold, out_hold;
  index_gen_unary dut (.clk, .rst_n, .in, .in_hold, .out, .out_hold, .cfg_pair_name(4'd8),
                       .cfg_diag_name(4'd9));
  tb_src u_src (.clk, .rst_n, .out(in), .hold(in_hold));
  tb_snk u_snk (.clk, .rst_n, .in(out), .hold(out_hold));
  initial begin
    reset_dut();
    for (int blk = 0; blk < 4; blk++) begin
      int n, ndiag;
      bit seen [256][256];
      n = (blk == 2) ? 0 : $urandom_range(1, 25);
      ndiag = 0;
      u_snk.got = {};
      foreach (seen[x, y]) seen[x][y] = 0;
      for (int i = 0; i < n; i++) u_src.push(mk_word(4'd1, 16'($urandom)));
      u_src.push(mk_cmpl(4'd3, 16'(blk)));
      while (u_snk.got.size() < n * (n + 1) / 2 + 1) @(posedge clk);
      repeat (10) @(posedge clk);
      chk(u_snk.got.size() == n * (n + 1) / 2 + 1, "pair count");
      for (int k = 0; k < u_snk.got.size() - 1; k++) begin
        word_t w; int j, i;
        w = u_snk.got[k]; j = w.data[15:8]; i = w.data[7:0];
        chk(is_data(w) && j <= i && i < n && !seen[j][i] && w.name == ((j == i) ? 4'd9 : 4'd8),
            $sformatf("pair %h name %0d", w.data, w.name));
        seen[j][i] = 1;
        if (j == i) ndiag++;
      end
      chk(ndiag == n, "diagonals");
      chk(u_snk.got[$] == mk_cmpl(4'd3, 16'(blk)), "complete last");
    end
    finish_tb();
  end
endmodule
