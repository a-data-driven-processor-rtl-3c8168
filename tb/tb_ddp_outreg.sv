// tb_ddp_outreg: pushes a numbered stream through the output register under
// random downstream holds and checks that no word is lost, duplicated or
// reordered, that can_push drops after a held push, and that an empty output
// register takes a word despite hold.
module tb_ddp_outreg;
  import ddp_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  word_t d, out;
  logic push, can_push, hold;
  int n_sent = 0, n_got = 0, stalls = 0;

  ddp_outreg dut (.clk, .rst_n, .d, .push, .can_push, .out, .out_hold(hold));

  always_comb begin
    d    = mk_word(4'(n_sent), 16'(n_sent));
    push = can_push && n_sent < 400 && ($urandom_range(3) != 0);
  end

  always @(posedge clk) if (rst_n) begin
    if (push) n_sent <= n_sent + 1;
    if (!can_push) stalls++;
    if (out.valid && !hold) begin
      checks++;
      if (out.data != 16'(n_got)) begin
        failures++;
        $display("order error: got %0d expected %0d", out.data, n_got);
      end
      n_got <= n_got + 1;
    end
  end

  initial begin
    hold = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // an empty register loads whatever the hold
    @(negedge clk) hold = 1;
    wait (n_sent >= 1);
    @(negedge clk);
    checks++;
    if (!out.valid || out.data != 0) begin failures++; $display("empty register did not load"); end
    while (n_sent < 400) begin
      @(negedge clk) hold = ($urandom_range(99) < 40);
    end
    hold = 0;
    repeat (10) @(posedge clk);
    checks++;
    if (n_got != 400) begin failures++; $display("got %0d of 400", n_got); end
    checks++;
    if (stalls == 0) begin failures++; $display("latch never filled"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
