// tb_table_unary: table T(a) = a*a + 5 addressed by data[11:4]; once with
// the input name kept, once with table bits [15:12] as the name.
module tb_table_unary;
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
  logic tbl_we; logic [7:0] tbl_addr; logic [15:0] tbl_data; logic nft;
  logic [5:0] sel [8];
  word_t exp[$];
  table_unary dut (.clk, .rst_n, .in, .in_hold, .out, .out_hold, .cfg_sel(sel),
                   .cfg_name_from_table(nft), .tbl_we, .tbl_addr, .tbl_data);
  tb_src u_src (.clk, .rst_n, .out(in), .hold(in_hold));
  tb_snk u_snk (.clk, .rst_n, .in(out), .hold(out_hold));
  function automatic logic [15:0] f(logic [7:0] a); return 16'(a * a + 5); endfunction
  initial begin
    tbl_we = 0; tbl_addr = 0; tbl_data = 0; nft = 0;
    for (int k = 0; k < 8; k++) sel[k] = 6'(4 + k);
    reset_dut();
    for (int a = 0; a < 256; a++) begin
      @(negedge clk); tbl_we = 1; tbl_addr = 8'(a); tbl_data = f(8'(a));
    end
    @(negedge clk) tbl_we = 0;
    for (int pass = 0; pass < 2; pass++) begin
      nft = 1'(pass);
      u_snk.got = {}; exp = {};
      for (int i = 0; i < 150; i++) begin
        logic [15:0] x; logic [15:0] y;
        x = 16'($urandom); y = f(x[11:4]);
        u_src.push(mk_word(4'd3, x));
        exp.push_back(mk_word(pass ? y[15:12] : 4'd3, y));
      end
      u_src.push(mk_cmpl(4'd1, 16'd77));
      exp.push_back(mk_cmpl(4'd1, 16'd77));
      while (u_snk.got.size() < exp.size()) @(posedge clk);
      cmpq(u_snk.got, exp, pass ? "name from table" : "name kept");
    end
    finish_tb();
  end
endmodule
