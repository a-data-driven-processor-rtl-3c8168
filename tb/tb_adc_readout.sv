// tb_adc_readout: random codes and cuts; only channels above their cut may
// be sent (a code equal to its cut is not), as {channel, code}, then the complete with the event number.
module tb_adc_readout;
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

  word_t out; logic out_hold, strobe, busy; logic [7:0] code [8], cutv [8];
  word_t exp[$];
  adc_readout dut (.clk, .rst_n, .strobe, .code, .cfg_cut(cutv), .cfg_name(4'd13), .busy,
                   .out, .out_hold);
  tb_snk u_snk (.clk, .rst_n, .in(out), .hold(out_hold));
  initial begin
    strobe = 0;
    foreach (code[i]) begin code[i] = 0; cutv[i] = 0; end
    reset_dut();
    for (int e = 0; e < 10; e++) begin
      u_snk.got = {}; exp = {};
      for (int c = 0; c < 8; c++) begin
        code[c] = 8'($urandom); cutv[c] = ($urandom_range(3) == 0) ? code[c] : 8'($urandom);
        if (code[c] > cutv[c]) exp.push_back(mk_word(4'd13, {5'd0, 3'(c), code[c]}));
      end
      exp.push_back(mk_cmpl(4'd13, 16'(e)));
      @(negedge clk) strobe = 1;
      @(negedge clk) strobe = 0;
      while (u_snk.got.size() < exp.size()) @(posedge clk);
      cmpq(u_snk.got, exp, $sformatf("event %0d", e));
    end
    finish_tb();
  end
endmodule
