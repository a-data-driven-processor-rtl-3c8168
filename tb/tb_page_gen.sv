// tb_page_gen: words named 5 must leave 3 times as names 5, 6, 7; other
// names once; order kept; completes pass.
module tb_page_gen;
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

  word_t in, out; logic in_hold, out_hold;
  word_t exp[$];
  page_gen dut (.clk, .rst_n, .in, .in_hold, .out, .out_hold, .cfg_name(4'd5),
                .cfg_copies(4'd3));
  tb_src u_src (.clk, .rst_n, .out(in), .hold(in_hold));
  tb_snk u_snk (.clk, .rst_n, .in(out), .hold(out_hold));
  initial begin
    reset_dut();
    for (int i = 0; i < 200; i++) begin
      logic [15:0] x; logic [3:0] nm;
      x = 16'($urandom); nm = ($urandom_range(2) == 0) ? 4'd5 : 4'($urandom_range(4));
      if (i % 40 == 39) begin
        u_src.push(mk_cmpl(4'd5, x)); exp.push_back(mk_cmpl(4'd5, x));
      end else begin
        u_src.push(mk_word(nm, x));
        if (nm == 5) for (int k = 0; k < 3; k++) exp.push_back(mk_word(4'(5 + k), x));
        else exp.push_back(mk_word(nm, x));
      end
    end
    while (u_snk.got.size() < exp.size()) @(posedge clk);
    cmpq(u_snk.got, exp, "pages");
    finish_tb();
  end
endmodule
