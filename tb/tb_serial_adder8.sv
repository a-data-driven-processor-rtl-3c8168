// tb_serial_adder8: eight random pairs of 16-bit numbers are sent LSB first;
// each reassembled 16-bit sum must equal a+b, one clock behind the operands.
module tb_serial_adder8;
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

  logic start; logic [7:0] a, b, s;
  serial_adder8 dut (.clk, .rst_n, .start, .a, .b, .s);
  initial begin
    start = 0; a = 0; b = 0;
    reset_dut();
    for (int n = 0; n < 50; n++) begin
      logic [15:0] x [8], y [8], z [8];
      foreach (x[k]) begin x[k] = 16'($urandom); y[k] = 16'($urandom); z[k] = '0; end
      for (int i = 0; i < 16; i++) begin
        @(negedge clk);
        start = (i == 0);
        foreach (x[k]) begin a[k] = x[k][i]; b[k] = y[k][i]; end
        if (i > 0) foreach (z[k]) z[k][i-1] = s[k];
      end
      @(negedge clk);
      foreach (z[k]) z[k][15] = s[k];
      foreach (z[k]) chk(z[k] == 16'(x[k] + y[k]), $sformatf("pair %0d: %h + %h gave %h", k, x[k], y[k], z[k]));
    end
    finish_tb();
  end
endmodule
