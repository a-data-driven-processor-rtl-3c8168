// tb_sigma_module: five signed 16-bit variables X_i are sent bit-serially,
// MSB first; the table holds the sums of five random constants A_i for every
// 8-bit address. Each result must equal sum A_i*X_i + A_0 (low 16 bits) and
// a new word can start every 16 clocks. The serial copy of each result
// (LSB first after y_start) must match too.
module tb_sigma_module;
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

  word_t out; logic out_hold, xs, tbl_we, busy; logic [7:0] xb, tbl_addr; logic [15:0] tbl_data;
  logic signed [15:0] A [8];
  logic [31:0] a0;
  word_t exp[$];
  sigma_module #(.NBITS(16)) dut (.clk, .rst_n, .x_bits(xb), .x_start(xs), .tbl_we, .tbl_addr,
    .tbl_data, .cfg_a0(a0), .cfg_name(4'd4), .res_busy(busy), .y_bit, .y_start,
    .out, .out_hold);
  logic y_bit, y_start;
  logic [15:0] ser_exp[$];
  int sbit = 16, nser = 0;
  logic [15:0] sv;
  always @(posedge clk) if (rst_n) begin
    if (y_start) begin sbit = 0; sv = '0; end
    if (sbit < 16) begin
      sv[sbit] = y_bit; sbit++;
      if (sbit == 16) begin
        chk(ser_exp.size() > 0 && sv == ser_exp[0], $sformatf("serial result %h", sv));
        if (ser_exp.size() > 0) void'(ser_exp.pop_front());
        nser++;
      end
    end
  end
  tb_snk #(.HOLD_PCT(20)) u_snk (.clk, .rst_n, .in(out), .hold(out_hold));
  initial begin
    xs = 0; xb = 0; tbl_we = 0; tbl_addr = 0; tbl_data = 0; a0 = 32'd12345;
    foreach (A[i]) A[i] = (i < 5) ? 16'($urandom_range(0, 200)) - 16'sd100 : 16'sd0;
    reset_dut();
    for (int ad = 0; ad < 256; ad++) begin
      logic signed [15:0] s;
      s = 0;
      for (int i = 0; i < 8; i++) if (ad[i]) s += A[i];
      @(negedge clk); tbl_we = 1; tbl_addr = 8'(ad); tbl_data = s;
    end
    @(negedge clk) tbl_we = 0;
    for (int n = 0; n < 40; n++) begin
      logic signed [15:0] X [8];
      logic signed [31:0] y;
      y = 32'(a0);
      foreach (X[i]) begin
        X[i] = (i < 5) ? 16'($urandom) : 16'd0;
        y += 32'(A[i]) * 32'(X[i]);
      end
      exp.push_back(mk_word(4'd4, y[15:0]));
      ser_exp.push_back(y[15:0]);
      while (busy) @(negedge clk);
      for (int b = 15; b >= 0; b--) begin
        @(negedge clk);
        xs = (b == 15);
        for (int i = 0; i < 8; i++) xb[i] = X[i][b];
      end
      @(negedge clk) xs = 0;
    end
    while (u_snk.got.size() < exp.size()) @(posedge clk);
    cmpq(u_snk.got, exp, "linear combinations");
    repeat (20) @(posedge clk);
    chk(nser == 40, "serial results");
    finish_tb();
  end
endmodule
