// tb_table_binary: table T(addr) = 1000 + addr*7 with addr = {a.data[3:0],
// b.data[3:0]}; two blocks of aligned words with random gaps, including a
// data word on b that meets a's complete and must be dropped.
module tb_table_binary;
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
  logic tbl_we; logic [7:0] tbl_addr; logic [15:0] tbl_data;
  logic [5:0] sel [8];
  word_t exp[$];
  table_binary dut (.clk, .rst_n, .a, .a_hold, .b, .b_hold, .out, .out_hold, .cfg_sel(sel),
                    .cfg_name_from_table(1'b1), .tbl_we, .tbl_addr, .tbl_data);
  tb_src u_sa (.clk, .rst_n, .out(a), .hold(a_hold));
  tb_src u_sb (.clk, .rst_n, .out(b), .hold(b_hold));
  tb_snk u_snk (.clk, .rst_n, .in(out), .hold(out_hold));
  function automatic logic [15:0] f(int ad); return 16'(1000 + ad * 7); endfunction
  initial begin
    tbl_we = 0; tbl_addr = 0; tbl_data = 0;
    for (int k = 0; k < 4; k++) begin sel[k] = 6'(k); sel[k+4] = 6'(20 + k); end
    reset_dut();
    for (int ad = 0; ad < 256; ad++) begin
      @(negedge clk); tbl_we = 1; tbl_addr = 8'(ad); tbl_data = f(ad);
    end
    @(negedge clk) tbl_we = 0;
    for (int blk = 0; blk < 3; blk++) begin
      for (int i = 0; i < 40; i++) begin
        logic [15:0] x, y; logic [15:0] r;
        x = 16'($urandom); y = 16'($urandom);
        r = f({x[3:0], y[3:0]});
        u_sa.push(mk_word(4'd5, x)); u_sb.push(mk_word(4'd6, y));
        exp.push_back(mk_word(r[15:12], r));
      end
      if (blk == 1) u_sb.push(mk_word(4'd6, 16'd1));
      u_sa.push(mk_cmpl(4'd7, 16'(blk))); u_sb.push(mk_cmpl(4'd8, 16'd0));
      exp.push_back(mk_cmpl(4'd7, 16'(blk)));
    end
    while (u_snk.got.size() < exp.size()) @(posedge clk);
    repeat (20) @(posedge clk);
    cmpq(u_snk.got, exp, "binary table");
    finish_tb();
  end
endmodule
