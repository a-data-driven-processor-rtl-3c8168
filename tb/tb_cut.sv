// tb_cut: random words through the cut under random holds; each output name
// is checked against a reference compare, completes must pass unchanged.
module tb_cut;
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
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    finish_tb();
  end

  word_t in, out; logic in_hold, out_hold;
  word_t exp[$];
  cut dut (.clk, .rst_n, .in, .in_hold, .out, .out_hold, .cfg_lo(16'd1000), .cfg_hi(16'd3000),
           .cfg_name_below(4'd1), .cfg_name_in(4'd2), .cfg_name_above(4'd3));
  tb_src u_src (.clk, .rst_n, .out(in), .hold(in_hold));
  tb_snk u_snk (.clk, .rst_n, .in(out), .hold(out_hold));
  initial begin
    reset_dut();
    for (int i = 0; i < 300; i++) begin
      logic [15:0] v;
      v = (i % 50 == 49) ? 16'd0 : 16'($urandom_range(4000));
      if (i % 3 == 0) v = (i % 2) ? 16'd1000 : 16'd3000;
      if (i % 50 == 49) begin
        u_src.push(mk_cmpl(4'd9, 16'(i)));
        exp.push_back(mk_cmpl(4'd9, 16'(i)));
      end else begin
        u_src.push(mk_word(4'd0, v));
        exp.push_back(mk_word((v < 1000) ? 4'd1 : (v > 3000) ? 4'd3 : 4'd2, v));
      end
    end
    while (u_snk.got.size() < exp.size()) @(posedge clk);
    cmpq(u_snk.got, exp, "cut");
    finish_tb();
  end
endmodule
