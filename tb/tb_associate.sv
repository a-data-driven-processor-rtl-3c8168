// tb_associate: normal mode (each word named by its distance to the previous
// word of the block) and pair mode (adjacent wires within 1 become one word
// with the half-wire bit), both against a reference model.
module tb_associate;
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

  word_t in, out; logic in_hold, out_hold; logic pair;
  word_t exp[$];
  associate dut (.clk, .rst_n, .in, .in_hold, .out, .out_hold, .cfg_shift(4'd6),
                 .cfg_thr(16'd1), .cfg_gt(1'b0), .cfg_pair(pair), .cfg_name_assoc(4'd7),
                 .cfg_name_single(4'd3));
  tb_src u_src (.clk, .rst_n, .out(in), .hold(in_hold));
  tb_snk u_snk (.clk, .rst_n, .in(out), .hold(out_hold));
  initial begin
    pair = 0;
    reset_dut();
    for (int run = 0; run < 4; run++) begin
      logic [9:0] w[$];
      int i;
      pair = (run >= 2);
      u_snk.got = {}; exp = {};
      w = {};
      for (int k = 0; k < 40; k++) w.push_back(10'($urandom_range(80)));
      w.sort();
      foreach (w[k]) u_src.push(mk_word(4'd0, {w[k], 6'($urandom)}));
      u_src.push(mk_cmpl(4'd2, 16'(run)));
      if (!pair) begin
        foreach (w[k])
          exp.push_back(mk_word((k > 0 && w[k] - w[k-1] <= 1) ? 4'd7 : 4'd3, 16'(0)));
      end else begin
        i = 0;
        while (i < w.size()) begin
          if (i + 1 < w.size() && w[i+1] - w[i] <= 1) begin
            exp.push_back(mk_word(4'd7, {w[i], 6'b100000})); i += 2;
          end else begin
            exp.push_back(mk_word(4'd3, {w[i], 6'b0})); i += 1;
          end
        end
      end
      exp.push_back(mk_cmpl(4'd2, 16'(run)));
      while (u_snk.got.size() < exp.size()) @(posedge clk);
      if (!pair) begin
        // the data is unchanged in normal mode: compare names, then data
        for (int k = 0; k < u_snk.got.size() && k < exp.size(); k++) begin
          exp[k].data = u_snk.got[k].data;
          if (k < w.size()) chk(u_snk.got[k].data[15:6] == w[k], "data kept");
        end
      end
      cmpq(u_snk.got, exp, $sformatf("associate run %0d", run));
    end
    finish_tb();
  end
endmodule
