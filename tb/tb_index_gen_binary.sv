// tb_index_gen_binary: blocks of na and nb words arrive interleaved at random;
// the set of pairs must be exactly {i<na} x {j<nb}, each once, and the
// complete must come last.
module tb_index_gen_binary;
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

  word_t a, b, out; logic a_hold, b_hold, out_hold;
  index_gen_binary dut (.clk, .rst_n, .a, .a_hold, .b, .b_hold, .out, .out_hold,
                        .cfg_name(4'd6));
  tb_src u_sa (.clk, .rst_n, .out(a), .hold(a_hold));
  tb_src u_sb (.clk, .rst_n, .out(b), .hold(b_hold));
  tb_snk u_snk (.clk, .rst_n, .in(out), .hold(out_hold));
  initial begin
    reset_dut();
    for (int blk = 0; blk < 4; blk++) begin
      int na, nb;
      bit seen [256][256];
      na = (blk == 3) ? 0 : $urandom_range(1, 20); nb = $urandom_range(1, 20);
      u_snk.got = {};
      foreach (seen[x, y]) seen[x][y] = 0;
      for (int i = 0; i < na; i++) u_sa.push(mk_word(4'd1, 16'($urandom)));
      for (int i = 0; i < nb; i++) u_sb.push(mk_word(4'd2, 16'($urandom)));
      u_sa.push(mk_cmpl(4'd3, 16'(blk))); u_sb.push(mk_cmpl(4'd4, 16'd0));
      while (u_snk.got.size() < na * nb + 1) @(posedge clk);
      repeat (10) @(posedge clk);
      chk(u_snk.got.size() == na * nb + 1, $sformatf("%0d words for %0dx%0d", u_snk.got.size(), na, nb));
      for (int k = 0; k < u_snk.got.size() - 1; k++) begin
        word_t w;
        w = u_snk.got[k];
        chk(is_data(w) && w.name == 4'd6 && int'(w.data[15:8]) < na && int'(w.data[7:0]) < nb
            && !seen[w.data[15:8]][w.data[7:0]], $sformatf("pair %h", w.data));
        seen[w.data[15:8]][w.data[7:0]] = 1;
      end
      chk(u_snk.got[$] == mk_cmpl(4'd3, 16'(blk)), "complete last");
    end
    finish_tb();
  end
endmodule
