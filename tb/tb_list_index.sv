// tb_list_index: a block of random words is written; random indices are read
// back (some before their word is written, which must wait); the write
// complete must wait for the read complete and merge with it; a second block
// then starts at index 0.
module tb_list_index;
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

  word_t wr, rd, out; logic wr_hold, rd_hold, out_hold;
  word_t exp[$];
  list_index #(.DEPTH(256), .IDX_LSB(8)) dut (.clk, .rst_n, .wr, .wr_hold, .rd, .rd_hold,
                                              .out, .out_hold);
  tb_src u_sw (.clk, .rst_n, .out(wr), .hold(wr_hold));
  tb_src u_sr (.clk, .rst_n, .out(rd), .hold(rd_hold));
  tb_snk u_snk (.clk, .rst_n, .in(out), .hold(out_hold));
  initial begin
    reset_dut();
    for (int blk = 0; blk < 3; blk++) begin
      logic [15:0] v[$];
      u_snk.got = {}; exp = {};
      v = {};
      for (int i = 0; i < 30 + blk * 10; i++) v.push_back(16'($urandom));
      foreach (v[i]) u_sw.push(mk_word(4'd1, v[i]));
      u_sw.push(mk_cmpl(4'd2, 16'(100 + blk)));
      for (int i = 0; i < 60; i++) begin
        int k; logic [3:0] nm;
        k = $urandom_range(v.size() - 1); nm = 4'($urandom);
        u_sr.push(mk_word(nm, {8'(k), 8'($urandom)}));
        exp.push_back(mk_word(nm, v[k]));
      end
      u_sr.push(mk_cmpl(4'd6, 16'd0));
      exp.push_back(mk_cmpl(4'd6, 16'(100 + blk)));
      while (u_snk.got.size() < exp.size()) @(posedge clk);
      cmpq(u_snk.got, exp, $sformatf("block %0d", blk));
    end
    finish_tb();
  end
endmodule
