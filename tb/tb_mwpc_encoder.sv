// tb_mwpc_encoder: random coincidence patterns are latched; the encoder must
// send the hit wire numbers in increasing order with the crate name, stop at
// the word limit, end with a complete holding the event number, and keep to
// one word per two clocks (20 MHz) with a free output.
module tb_mwpc_encoder;
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
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    finish_tb();
  end

  word_t out; logic out_hold, strobe, busy; logic [1023:0] hits; logic [7:0] maxw;
  word_t exp[$];
  int prev_t = -1, min_gap = 1000;
  mwpc_encoder dut (.clk, .rst_n, .strobe, .hits, .cfg_crate(4'd11), .cfg_max_words(maxw),
                    .busy, .out, .out_hold);
  tb_snk u_snk (.clk, .rst_n, .in(out), .hold(out_hold));
  initial begin
    strobe = 0; hits = '0; maxw = 8'd255;
    reset_dut();
    for (int e = 0; e < 4; e++) begin
      int n;
      u_snk.got = {}; exp = {};
      hits = '0;
      for (int i = 0; i < 40; i++) hits[$urandom_range(1023)] = 1'b1;
      if (e == 3) for (int i = 100; i < 140; i++) hits[i] = 1'b1;   // dense, one card
      maxw = (e == 1) ? 8'd10 : 8'd255;
      n = 0;
      for (int w = 0; w < 1024; w++)
        if (hits[w] && n < maxw) begin exp.push_back(mk_word(4'd11, 16'(w))); n++; end
      exp.push_back(mk_cmpl(4'd11, 16'(e)));
      if (e == 3) begin force out_hold = 1'b0; measure = 1; end
      @(negedge clk) strobe = 1;
      @(negedge clk) strobe = 0;
      while (u_snk.got.size() < exp.size()) @(posedge clk);
      cmpq(u_snk.got, exp, $sformatf("event %0d", e));
      @(posedge clk);
      chk(!busy, "busy cleared");
    end
    chk(min_gap == 2, $sformatf("20 MHz word rate (closest words %0d clocks apart)", min_gap));
    finish_tb();
  end
  // word spacing on the dense card of event 3: two clocks per word
  bit measure = 0;
  always @(posedge clk) if (rst_n && measure && out.valid && !out_hold && !out.cmpl) begin
    if (prev_t >= 0 && ($time - prev_t) / 10 < min_gap) min_gap = int'(($time - prev_t) / 10);
    prev_t = int'($time);
  end
endmodule
