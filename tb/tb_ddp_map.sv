// tb_ddp_map: random hit wires are written; reads at random fixed-point
// positions must return the 9 cells around the integer part and the
// fraction. Unordered mode: reads wait for the write complete. Ordered mode:
// a read may go once a higher wire was written. After both completes the map
// must be empty again (checked with a block that writes nothing). The last
// two blocks use the 16-cell form: two words per read, 8 cells each.
module tb_ddp_map;
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

  word_t wr, rd, out; logic wr_hold, rd_hold, out_hold; logic ord, wide;
  word_t exp[$];
  logic [1023:0] cells;
  ddp_map dut (.clk, .rst_n, .wr, .wr_hold, .rd, .rd_hold, .out, .out_hold,
               .cfg_ordered(ord), .cfg_wide(wide));
  tb_src u_sw (.clk, .rst_n, .out(wr), .hold(wr_hold));
  tb_src u_sr (.clk, .rst_n, .out(rd), .hold(rd_hold));
  tb_snk u_snk (.clk, .rst_n, .in(out), .hold(out_hold));
  function automatic logic [15:0] road(logic [9:0] p, logic [5:0] fr);
    logic [8:0] win;
    for (int k = 0; k < 9; k++) begin
      int idx;
      idx = int'(p) - 4 + k;
      win[k] = (idx >= 0 && idx < 1024) ? cells[idx] : 1'b0;
    end
    return {win, fr, 1'b0};
  endfunction
  function automatic logic [15:0] road8(logic [9:0] p, logic [5:0] fr, int first);
    logic [7:0] win;
    for (int k = 0; k < 8; k++) begin
      int idx;
      idx = int'(p) + first + k;
      win[k] = (idx >= 0 && idx < 1024) ? cells[idx] : 1'b0;
    end
    return {win, fr, 2'b0};
  endfunction
  initial begin
    ord = 0; wide = 0;
    reset_dut();
    for (int blk = 0; blk < 6; blk++) begin
      logic [9:0] hw[$];
      ord = blk[0]; wide = (blk >= 4);
      u_snk.got = {}; exp = {};
      cells = '0; hw = {};
      if (blk != 3) for (int i = 0; i < 60; i++) hw.push_back(10'($urandom_range(1023)));
      if (ord) hw.sort();
      foreach (hw[i]) begin cells[hw[i]] = 1; u_sw.push(mk_word(4'd1, {6'd0, hw[i]})); end
      u_sw.push(mk_cmpl(4'd1, 16'd0));
      for (int i = 0; i < 80; i++) begin
        logic [9:0] p; logic [5:0] fr;
        p = (i % 2 && hw.size() > 0) ? hw[$urandom_range(hw.size() - 1)] + 10'($urandom_range(4)) - 10'd2
                                     : 10'($urandom_range(1023));
        fr = 6'($urandom);
        u_sr.push(mk_word(4'd3, {p, fr}));
        if (wide) begin
          exp.push_back(mk_word(4'd3, road8(p, fr, -8)));
          exp.push_back(mk_word(4'd3, road8(p, fr, 0)));
        end else exp.push_back(mk_word(4'd3, road(p, fr)));
      end
      u_sr.push(mk_cmpl(4'd7, 16'(blk)));
      exp.push_back(mk_cmpl(4'd7, 16'(blk)));
      while (u_snk.got.size() < exp.size()) @(posedge clk);
      cmpq(u_snk.got, exp, $sformatf("map block %0d", blk));
    end
    finish_tb();
  end
endmodule
