// tb_normalizer: loads F(h) = 3*h*256 + 7 and G(l) = 3*l, so a 16-bit input x
// gives 3*x + 7; then a name-paged setup (name bits as address bits) is
// checked against the same reference. Completes pass unchanged.
module tb_normalizer;
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
  logic tbl_we, tbl_sel; logic [7:0] tbl_addr; logic [15:0] tbl_data;
  logic [5:0] sel_hi [8], sel_lo [8];
  word_t exp[$];
  normalizer dut (.clk, .rst_n, .in, .in_hold, .out, .out_hold, .cfg_sel_hi(sel_hi),
                  .cfg_sel_lo(sel_lo), .tbl_we, .tbl_sel, .tbl_addr, .tbl_data);
  tb_src u_src (.clk, .rst_n, .out(in), .hold(in_hold));
  tb_snk u_snk (.clk, .rst_n, .in(out), .hold(out_hold));
  initial begin
    tbl_we = 0; tbl_sel = 0; tbl_addr = 0; tbl_data = 0;
    for (int k = 0; k < 8; k++) begin sel_hi[k] = 6'(8 + k); sel_lo[k] = 6'(k); end
    reset_dut();
    for (int a = 0; a < 256; a++) begin
      @(negedge clk);
      tbl_we = 1; tbl_sel = 1; tbl_addr = 8'(a); tbl_data = 16'(3 * a * 256 + 7);
      @(negedge clk);
      tbl_sel = 0; tbl_data = 16'(3 * a);
    end
    @(negedge clk) tbl_we = 0;
    for (int i = 0; i < 200; i++) begin
      logic [15:0] x;
      x = 16'($urandom);
      u_src.push(mk_word(4'(i), x));
      exp.push_back(mk_word(4'(i), 16'(3 * x + 7)));
    end
    u_src.push(mk_cmpl(4'd2, 16'h1234));
    exp.push_back(mk_cmpl(4'd2, 16'h1234));
    while (u_snk.got.size() < exp.size()) @(posedge clk);
    cmpq(u_snk.got, exp, "linear");
    // paged: address = {name[1:0], data[5:0]} for both tables
    for (int k = 0; k < 6; k++) begin sel_hi[k] = 6'(k); sel_lo[k] = 6'(k); end
    sel_hi[6] = 16; sel_hi[7] = 17; sel_lo[6] = 16; sel_lo[7] = 17;
    u_snk.got = {}; exp = {};
    for (int i = 0; i < 100; i++) begin
      logic [15:0] x; logic [3:0] n; logic [7:0] ad;
      x = 16'($urandom); n = 4'($urandom);
      ad = {n[1:0], x[5:0]};
      u_src.push(mk_word(n, x));
      exp.push_back(mk_word(n, 16'(3 * ad * 256 + 7 + 3 * ad)));
    end
    while (u_snk.got.size() < exp.size()) @(posedge clk);
    cmpq(u_snk.got, exp, "paged");
    finish_tb();
  end
endmodule
