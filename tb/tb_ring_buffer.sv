// tb_ring_buffer: two ring buffers share a read bus (holds ORed). Events of
// random size are written; each buffer feeds its processor output; random
// read/skip commands must read out exactly the earliest event of each buffer
// or drop it, in unison. Also checks the write hold when the ring is full.
module tb_ring_buffer;
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

  word_t wr [2], proc [2], ro [2];
  logic wr_hold [2], proc_hold [2], ro_hold [2], cmd_hold [2];
  logic cmd_valid, cmd_read, bus_hold;
  word_t ev [2][$];
  word_t exp_ro [2][$], exp_proc [2][$];
  int nread = 0, nskip = 0, wr_stall = 0;
  assign bus_hold = cmd_hold[0] | cmd_hold[1];
  for (genvar g = 0; g < 2; g++) begin : g_rb
    ring_buffer #(.DEPTH(64), .EVQ(4)) dut (.clk, .rst_n, .wr(wr[g]), .wr_hold(wr_hold[g]),
      .proc(proc[g]), .proc_hold(proc_hold[g]), .ro(ro[g]), .ro_hold(ro_hold[g]), .cmd_valid,
      .cmd_read, .cmd_bus_hold(bus_hold), .cmd_hold(cmd_hold[g]));
    tb_src u_src (.clk, .rst_n, .out(wr[g]), .hold(wr_hold[g]));
    tb_snk u_sp (.clk, .rst_n, .in(proc[g]), .hold(proc_hold[g]));
    tb_snk u_sr (.clk, .rst_n, .in(ro[g]), .hold(ro_hold[g]));
  end
  always @(posedge clk) if (rst_n && wr[0].valid && wr_hold[0]) wr_stall++;
  initial begin
    cmd_valid = 0; cmd_read = 0;
    reset_dut();
    for (int e = 0; e < 30; e++)
      for (int g = 0; g < 2; g++) begin
        int n;
        n = $urandom_range(0, 12);
        for (int i = 0; i < n; i++) begin
          word_t w;
          w = mk_word(4'(g), 16'($urandom));
          ev[g].push_back(w);
          exp_proc[g].push_back(w);
          if (g == 0) g_rb[0].u_src.push(w); else g_rb[1].u_src.push(w);
        end
        ev[g].push_back(mk_cmpl(4'(g), 16'(e)));
        exp_proc[g].push_back(mk_cmpl(4'(g), 16'(e)));
        if (g == 0) g_rb[0].u_src.push(mk_cmpl(4'(g), 16'(e)));
        else        g_rb[1].u_src.push(mk_cmpl(4'(g), 16'(e)));
      end
    for (int e = 0; e < 30; e++) begin
      logic rdc;
      rdc = $urandom_range(1);
      @(negedge clk);
      cmd_valid = 1; cmd_read = rdc;
      @(posedge clk);
      while (bus_hold) @(posedge clk);
      @(negedge clk) cmd_valid = 0;
      for (int g = 0; g < 2; g++) begin
        word_t w;
        do begin
          w = ev[g].pop_front();
          if (rdc) exp_ro[g].push_back(w);
        end while (!is_cmpl(w));
      end
      if (rdc) nread++; else nskip++;
    end
    repeat (200) @(posedge clk);
    cmpq(g_rb[0].u_sr.got, exp_ro[0], "readout 0");
    cmpq(g_rb[1].u_sr.got, exp_ro[1], "readout 1");
    cmpq(g_rb[0].u_sp.got, exp_proc[0], "processor 0");
    cmpq(g_rb[1].u_sp.got, exp_proc[1], "processor 1");
    chk(nread > 0 && nskip > 0, "both commands used");
    chk(wr_stall > 0, "write held when ring full");
    finish_tb();
  end
endmodule
