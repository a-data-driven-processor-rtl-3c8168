// tb_register_readout: every latched register must leave in order as a fixed
// block, then the complete with the event number, two clocks per word.
module tb_register_readout;
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

  word_t out; logic out_hold, strobe, busy; logic [15:0] regs [4];
  word_t exp[$];
  int t0;
  register_readout #(.NREG(4)) dut (.clk, .rst_n, .strobe, .regs, .cfg_name(4'd14), .busy,
                                    .out, .out_hold);
  tb_snk #(.HOLD_PCT(0)) u_snk (.clk, .rst_n, .in(out), .hold(out_hold));
  initial begin
    strobe = 0;
    foreach (regs[i]) regs[i] = 0;
    reset_dut();
    for (int e = 0; e < 6; e++) begin
      u_snk.got = {}; exp = {};
      foreach (regs[i]) begin regs[i] = 16'($urandom); exp.push_back(mk_word(4'd14, regs[i])); end
      exp.push_back(mk_cmpl(4'd14, 16'(e)));
      @(negedge clk) strobe = 1;
      t0 = int'($time);
      @(negedge clk) begin strobe = 0; foreach (regs[i]) regs[i] = 0; end
      while (u_snk.got.size() < exp.size()) @(posedge clk);
      cmpq(u_snk.got, exp, $sformatf("event %0d", e));
      chk(($time - t0) / 10 <= 2 * 4 + 4, $sformatf("block took %0d clocks", ($time - t0) / 10));
      repeat (3) @(posedge clk);
    end
    finish_tb();
  end
endmodule
