// tb_drift_encoder: random hits with random binary drift times, given to the
// encoder in Gray code; the words must carry base+channel and the binary
// time, in channel order, one per clock when not held, then the complete.
module tb_drift_encoder;
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

  word_t out; logic out_hold, strobe, busy; logic [31:0] hit; logic [5:0] tg [32];
  word_t exp[$];
  int prev_t = -1, min_gap = 1000;
  drift_encoder #(.NCH(32)) dut (.clk, .rst_n, .strobe, .hit, .tgray(tg), .cfg_plane(4'd3),
    .cfg_wire_base(10'd64), .cfg_max_words(8'd255), .busy, .out, .out_hold);
  tb_snk u_snk (.clk, .rst_n, .in(out), .hold(out_hold));
  always @(posedge clk) if (rst_n && out.valid && !out_hold && !out.cmpl) begin
    if (prev_t >= 0 && ($time - prev_t) / 10 < min_gap) min_gap = int'(($time - prev_t) / 10);
    prev_t = int'($time);
  end
  initial begin
    strobe = 0; hit = '0;
    foreach (tg[i]) tg[i] = '0;
    reset_dut();
    for (int e = 0; e < 5; e++) begin
      u_snk.got = {}; exp = {};
      hit = (e == 4) ? 32'hffffffff : $urandom;
      for (int c = 0; c < 32; c++) begin
        logic [5:0] t;
        t = 6'($urandom);
        tg[c] = t ^ (t >> 1);
        if (hit[c]) exp.push_back(mk_word(4'd3, {10'(64 + c), t}));
      end
      exp.push_back(mk_cmpl(4'd3, 16'(e)));
      if (e == 4) force out_hold = 1'b0;
      @(negedge clk) strobe = 1;
      @(negedge clk) begin strobe = 0; foreach (tg[i]) tg[i] = '0; end
      while (u_snk.got.size() < exp.size()) @(posedge clk);
      cmpq(u_snk.got, exp, $sformatf("event %0d", e));
    end
    chk(min_gap == 1, "one word per clock (25 ns)");
    finish_tb();
  end
endmodule
