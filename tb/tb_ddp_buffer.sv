// tb_ddp_buffer: a 128-word buffer fed at full rate while the output is held
// for a long stretch: it must fill (hold the input exactly when full), then
// deliver every word in order; with a free output it must pass one word per
// clock with read and write in the same cycle.
module tb_ddp_buffer;
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

  word_t in, out; logic in_hold, out_hold;
  word_t exp[$];
  int maxcnt = 0, full_seen = 0;
  ddp_buffer dut (.clk, .rst_n, .in, .in_hold, .out, .out_hold);
  tb_src #(.GAP_PCT(0)) u_src (.clk, .rst_n, .out(in), .hold(in_hold));
  tb_snk #(.HOLD_PCT(0)) u_snk (.clk, .rst_n, .in(out), .hold(out_hold));
  always @(posedge clk) if (rst_n) begin
    if (int'(dut.cnt) > maxcnt) maxcnt = int'(dut.cnt);
    if (in_hold) full_seen++;
  end
  initial begin
    int t0;
    force out_hold = 1'b1;
    reset_dut();
    for (int i = 0; i < 400; i++) begin
      u_src.push(mk_word(4'(i), 16'(i)));
      exp.push_back(mk_word(4'(i), 16'(i)));
    end
    repeat (300) @(posedge clk);
    chk(maxcnt == 128, $sformatf("buffer depth reached %0d", maxcnt));
    chk(in_hold == 1'b1, "input held when full");
    release out_hold;
    t0 = $time;
    while (u_snk.got.size() < exp.size()) @(posedge clk);
    // 400 words through at one per clock (plus a few clocks of latency)
    chk(($time - t0) / 10 <= 400 + 6, $sformatf("throughput: %0d clocks", ($time - t0) / 10));
    cmpq(u_snk.got, exp, "fifo order");
    finish_tb();
  end
endmodule
