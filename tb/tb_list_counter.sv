// tb_list_counter: closes a loop in the testbench. Words written pass to the
// output; the testbench plays the test: each passthrough word of name 1 is
// returned at the read port with name 2 (pass) or 4 (fail). A pass must
// retrieve the stored word at that count. With MAX_OUT = 8 the write port
// must stop while 8 stored words are still out. Checks passthrough order, the
// retrieved words, and that the complete comes only after all returns. The
// memory is cut to 16 words, so each 50-word block wraps around it.
module tb_list_counter;
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

  word_t wr, rd, out; logic wr_hold, rd_hold, out_hold;
  word_t exp_pass[$], exp_ret[$];
  int max_out = 0, throttled = 0;
  always @(posedge clk) if (rst_n) begin
    if (int'(dut.wcnt - dut.rcnt) > max_out) max_out = int'(dut.wcnt - dut.rcnt);
    if (wr.valid && wr_hold && dut.wcnt - dut.rcnt == 8) throttled++;
  end
  list_counter #(.DEPTH(16), .MAX_OUT(8)) dut (.clk, .rst_n, .wr, .wr_hold, .rd, .rd_hold, .out, .out_hold,
                    .cfg_wr_name(4'd1), .cfg_rd_name(4'd2));
  tb_src u_sw (.clk, .rst_n, .out(wr), .hold(wr_hold));
  tb_src #(.GAP_PCT(85)) u_sr (.clk, .rst_n, .out(rd), .hold(rd_hold));
  tb_snk u_snk (.clk, .rst_n, .in(out), .hold(out_hold));
  int nret = 0, ngot = 0, ncmpl = 0, retrieved = 0, passthru = 0;
  initial begin
    reset_dut();
    for (int blk = 0; blk < 2; blk++) begin
      int nstore;
      exp_pass = {}; exp_ret = {};
      nstore = 0;
      for (int i = 0; i < 50; i++) begin
        logic [15:0] x; logic [3:0] nm;
        x = 16'($urandom); nm = ($urandom_range(3) == 0) ? 4'd9 : 4'd1;
        u_sw.push(mk_word(nm, x));
        exp_pass.push_back(mk_word(nm, x));
      end
      u_sw.push(mk_cmpl(4'd5, 16'(blk)));
      while (ncmpl == blk) begin
        @(posedge clk);
        while (ngot < u_snk.got.size()) begin
          word_t w;
          w = u_snk.got[ngot++];
          if (is_cmpl(w)) begin
            chk(w == mk_cmpl(4'd5, 16'(blk)), "output complete");
            chk(exp_pass.size() == 0 && exp_ret.size() == 0 && nret == nstore,
                "complete after every return");
            ncmpl++;
          end else if (w.name == 4'd1 || w.name == 4'd9) begin
            chk(exp_pass.size() > 0 && w == exp_pass[0], "passthrough order");
            void'(exp_pass.pop_front());
            passthru++;
            if (w.name == 4'd1) begin
              logic p;
              p = $urandom_range(1);
              u_sr.push(mk_word(p ? 4'd2 : 4'd4, 16'(nstore)));
              if (p) exp_ret.push_back(mk_word(4'd2, w.data));
              nstore++;
            end
          end else begin
            chk(exp_ret.size() > 0 && w == exp_ret[0], "retrieved word");
            void'(exp_ret.pop_front());
            nret++;
            retrieved++;
          end
        end
        nret = nstore - u_sr.pending() - int'(exp_ret.size());
      end
    end
    chk(retrieved > 10 && passthru == 100, "activity");
    chk(max_out <= 8 && throttled > 0, $sformatf("loop throttle: max %0d out, held %0d", max_out, throttled));
    finish_tb();
  end
endmodule
