// tb_event_gen: per event a few trigger words (random id bits and frequency
// codes) then a complete. The command must be read exactly when some word
// with at least one id bit has a frequency code f that matches the event
// count (count mod 2^f == 0). Each event also brings 0 to 6 track parameter
// words on the second input. A read must be followed by the header: the OR
// of the id bits, the parameters (only the first 4, as PDEPTH is cut to 4),
// then the event count.
module tb_event_gen;
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

  word_t trig, hdr, par; logic par_hold; logic trig_hold, hdr_hold, cmd_valid, cmd_read, cmd_hold;
  logic exp_cmd[$];
  word_t exp_hdr[$];
  logic got_cmd[$];
  int n_over = 0;
  event_gen #(.PDEPTH(4)) dut (.clk, .rst_n, .trig, .trig_hold, .hdr, .hdr_hold, .cmd_valid,
                 .cmd_read, .cmd_hold, .par, .par_hold, .cfg_hdr_name(4'd15));
  tb_src u_par (.clk, .rst_n, .out(par), .hold(par_hold));
  tb_src u_src (.clk, .rst_n, .out(trig), .hold(trig_hold));
  tb_snk u_snk (.clk, .rst_n, .in(hdr), .hold(hdr_hold));
  always @(posedge clk) begin
    if (rst_n && cmd_valid && !cmd_hold) got_cmd.push_back(cmd_read);
    cmd_hold <= ($urandom_range(2) == 0);
  end
  initial begin
    reset_dut();
    for (int e = 0; e < 60; e++) begin
      logic [11:0] ids; logic rd; int n, np; word_t pw[$];
      ids = 0; rd = 0; n = $urandom_range(0, 3);
      for (int i = 0; i < n; i++) begin
        logic [3:0] f; logic [11:0] id;
        f = 4'($urandom_range(0, 3)); id = ($urandom_range(3) == 0) ? 12'd0 : 12'($urandom);
        if (e % (1 << f) == 0 && id != 0) rd = 1;
        ids |= id;
        u_src.push(mk_word(4'd1, {f, id}));
      end
      u_src.push(mk_cmpl(4'd1, 16'd0));
      exp_cmd.push_back(rd);
      np = $urandom_range(0, 6);
      pw = {};
      for (int i = 0; i < np; i++) begin
        word_t w;
        w = mk_word(4'd10, 16'($urandom));
        u_par.push(w);
        if (i < 4) pw.push_back(w);
      end
      u_par.push(mk_cmpl(4'd10, 16'd0));
      if (np > 4) n_over++;
      if (rd) begin
        exp_hdr.push_back(mk_word(4'd15, {4'd0, ids}));
        foreach (pw[i]) exp_hdr.push_back(pw[i]);
        exp_hdr.push_back(mk_cmpl(4'd15, 16'(e)));
      end
    end
    while (got_cmd.size() < exp_cmd.size()) @(posedge clk);
    repeat (20) @(posedge clk);
    chk(got_cmd.size() == exp_cmd.size(), "command count");
    foreach (exp_cmd[i]) chk(got_cmd[i] == exp_cmd[i], $sformatf("command %0d", i));
    cmpq(u_snk.got, exp_hdr, "header");
    chk(n_over > 0, "more parameters than kept");
    finish_tb();
  end
endmodule
