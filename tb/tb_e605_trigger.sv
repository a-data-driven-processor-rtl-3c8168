// tb_e605_trigger: end-to-end run of the trigger processor at its default
// sizes. Tables are loaded so that a straight track hits the same wire in Y3
// and Y1 and the same wire in Y4 and Y2 (the normalizers project Y3 onto Y1,
// Y4 onto Y2), log P is log(Y3) - log(Y4), and a track candidate is good
// when Y3 >= Y4. One good candidate triggers (id bit 0, every event); two
// good candidates form a pair trigger (id bit 1, frequency code 1).
// Events with random tracks and noise are read out back to back. An
// independent model of the whole chain (wire pairing, roads, cuts, trigger)
// predicts for every event whether it is read or skipped, the header, and
// every word each ring buffer must send; the header of a read event must
// carry the track parameter word of every candidate that passed the roads.
// Every mechanism of the design must
// occur at least once; the counts are printed. Afterwards the sigma module
// forms eight linear combinations; its serial result is added to a constant
// by the serial adder, and both results are checked.
module tb_e605_trigger;
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
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    finish_tb();
  end

  localparam int NE = 24;
  logic        strobe, busy, map_ordered, tbl_we, tbl_hi, hdr_hold, sg_x_start, sg_busy;
  logic [1023:0] mwpc_hits [2];
  logic [31:0] drift_hit [4];
  logic [5:0]  drift_tgray [4][32];
  logic [7:0]  adc_code [8], adc_cut [8], max_words, tbl_addr, ro_hold, sg_x_bits;
  logic [15:0] reg_data [4], cut_lo, cut_hi, tbl_data;
  logic [3:0]  tbl_tgt;
  logic [31:0] sg_a0;
  word_t       ro [8], hdr, sg_out;

  e605_trigger dut (.clk, .rst_n, .strobe, .mwpc_hits, .drift_hit, .drift_tgray, .adc_code,
    .adc_cut, .reg_data, .max_words, .busy, .map_ordered, .cut_lo, .cut_hi, .tbl_we, .tbl_tgt,
    .tbl_hi, .tbl_addr, .tbl_data, .ro, .ro_hold, .hdr, .hdr_hold, .sg_x_bits, .sg_x_start,
    .sg_a0, .sg_busy, .sg_out, .sg_out_hold(1'b0), .sg_y_bit, .sg_y_start, .sa_start,
    .sa_a, .sa_b, .sa_s);
  logic sg_y_bit, sg_y_start, sa_start = 0; logic [7:0] sa_a, sa_b = 0, sa_s;

  // sigma module and serial adder: the serial result of the sigma module is
  // added to a constant in all eight lanes of the serial adder.
  logic [15:0] sg_c = 0, sg_par[$], sg_ser[$], sg_sum[$];
  int sg_si = 16, sg_bi = 16, n_sigma = 0, n_sadd = 0;
  logic [15:0] sg_sv, sg_av;
  assign sa_a = {8{sg_y_bit}};
  always @(negedge clk) if (rst_n) begin
    if (sg_out.valid && is_data(sg_out)) begin sg_par.push_back(sg_out.data); n_sigma++; end
    if (sg_si < 16) begin
      chk(sa_s == 8'h00 || sa_s == 8'hff, "serial adder lanes agree");
      sg_av[sg_si] = sa_s[0]; sg_si++;
      if (sg_si == 16) begin sg_sum.push_back(sg_av); n_sadd++; end
    end
    if (sg_bi < 16) begin sg_sv[sg_bi] = sg_y_bit; sg_bi++; if (sg_bi == 16) sg_ser.push_back(sg_sv); end
    if (sg_y_start) begin sg_si = 0; sg_bi = 0; sg_sv[0] = sg_y_bit; sg_bi = 1; end
    sa_start = sg_y_start;
    sa_b = {8{(sg_bi >= 1 && sg_bi <= 16) ? sg_c[sg_bi - 1] : 1'b0}};
  end

  // ------------------------------------------------ reference model pieces
  function automatic logic [15:0] logt(int x);   // log table, page 0
    return 16'($rtoi(32.0 * $ln(real'(x + 1)) / $ln(2.0)));
  endfunction

  // positions after ordered merge + pair associator, as data words
  function automatic void positions(input logic [31:0] pa, input logic [31:0] pb,
                                    output logic [15:0] pos[$]);
    int w[$];
    int i;
    pos = {};
    for (int c = 0; c < 32; c++) begin
      if (pa[c]) w.push_back(c);
      if (pb[c]) w.push_back(c);
    end
    i = 0;
    while (i < w.size()) begin
      if (i + 1 < w.size() && w[i+1] - w[i] <= 1) begin
        pos.push_back({10'(w[i]), 1'b1, 5'b0}); i += 2;
      end else begin
        pos.push_back({10'(w[i]), 1'b0, 5'b0}); i += 1;
      end
    end
  endfunction

  word_t exp_ro [8][$];
  word_t exp_hdr[$];
  logic  exp_rd[$];
  logic  got_cmd[$];
  word_t got_ro [8][$];
  word_t got_hdr[$];
  int    ev_strobe_t [NE], ev_cmd_t [NE];
  logic  cmd_seen = 0, ro_blocked = 0;
  int    ro_block_n = 0;
  int    ev_n34 [NE], n_small, ncand, n_cand_max = 0, n_hdr_par = 0;
  word_t pw[$];

  // ------------------------------------------------ collectors and counters
  int n_pass = 0, n_fail = 0, n_retr = 0, n_copy = 0, n_pair = 0, n_single = 0;
  int n_cut_in = 0, n_cut_out = 0, n_yy_ok = 0, n_yy_bad = 0, n_tpair = 0, n_tsing = 0;
  int n_read = 0, n_skip = 0, n_cmdhold = 0, n_lc_throttle = 0, n_erase = 0, n_eq = 0;
  int n_hold = 0, n_ro_hold = 0, n_buf = 0;
  function automatic logic xfer(word_t w, logic h); return w.valid && !h; endfunction
  always @(posedge clk) if (rst_n) begin
    if (xfer(dut.road, dut.road_h) && is_data(dut.road)) begin
      if (dut.road.name == 4'd2) n_pass++; else n_fail++;
    end
    if (xfer(dut.lco, dut.lco_h) && dut.lco.name == 4'd2 && is_data(dut.lco)) n_retr++;
    if (xfer(dut.pgo, dut.pgo_h) && dut.pgo.name == 4'd3 && is_data(dut.pgo)) n_copy++;
    if (xfer(dut.y3, dut.y3_h) && is_data(dut.y3)) begin
      if (dut.y3.data[5]) n_pair++; else n_single++;
    end
    if (xfer(dut.om3, dut.om3_h) && is_data(dut.rbp[2]) && is_data(dut.rbp[3]) &&
        dut.rbp[2].data[15:6] == dut.rbp[3].data[15:6]) n_eq++;
    if (xfer(dut.cpo, dut.cpo_h) && is_data(dut.cpo)) begin
      if (dut.cpo.name == 4'd6) n_cut_in++; else n_cut_out++;
    end
    if (xfer(dut.yyo, dut.yyo_h) && is_data(dut.yyo)) begin
      if (dut.yyo.name == 4'd8) n_yy_ok++; else n_yy_bad++;
    end
    if (xfer(dut.trk, dut.trk_h) && is_data(dut.trk)) begin
      if (dut.trk.name == 4'd11) n_tpair++; else n_tsing++;
    end
    if (dut.cmd_valid && !cmd_seen && got_cmd.size() < NE) ev_cmd_t[got_cmd.size()] = int'($time / 10);
    cmd_seen <= dut.cmd_valid && dut.cmd_bus_hold;
    if (dut.cmd_valid && !dut.cmd_bus_hold) begin
      got_cmd.push_back(dut.cmd_read);
      if (dut.cmd_read) n_read++; else n_skip++;
    end
    if (dut.cmd_valid && dut.cmd_bus_hold) n_cmdhold++;
    if (dut.pairs.valid && dut.pairs_h && dut.u_lc.wcnt - dut.u_lc.rcnt >= 64) n_lc_throttle++;
    if (dut.u_m1.erasing && dut.u_m1.ecnt != 0) n_erase++;
    if (dut.u_bloop.cnt != 0 && !dut.u_bloop.can_push) n_buf++;
    if (dut.y3.valid && dut.y3_h) n_hold++;
    for (int k = 0; k < 8; k++) if (xfer(ro[k], ro_hold[k])) got_ro[k].push_back(ro[k]);
    if (ro[0].valid && ro_hold[0]) n_ro_hold++;
    if (xfer(hdr, hdr_hold)) got_hdr.push_back(hdr);
    // once, after a read command of a later event, the read bus is blocked
    // for a while so that the next command has to wait for the ring buffers
    if (dut.cmd_valid && !dut.cmd_bus_hold && dut.cmd_read && got_cmd.size() >= 8 && !ro_blocked) begin
      ro_blocked = 1; ro_block_n = 300;
    end
    ro_hold  <= (ro_block_n > 0) ? 8'hff : 8'($urandom) & 8'($urandom);
    if (ro_block_n > 0) ro_block_n--;
    hdr_hold <= ($urandom_range(3) == 0);
  end

  task automatic load(input int tgt, input logic hi, input int a, input logic [15:0] v);
    @(negedge clk);
    tbl_we = 1; tbl_tgt = 4'(tgt); tbl_hi = hi; tbl_addr = 8'(a); tbl_data = v;
  endtask

  initial begin
    strobe = 0; map_ordered = 1; tbl_we = 0; tbl_hi = 0; tbl_tgt = 0; tbl_addr = 0;
    tbl_data = 0; max_words = 8'd255; cut_lo = 16'd0; cut_hi = 16'h7fff;
    sg_x_bits = 0; sg_x_start = 0; sg_a0 = 0;
    foreach (mwpc_hits[m]) mwpc_hits[m] = '0;
    foreach (drift_hit[d]) drift_hit[d] = '0;
    foreach (drift_tgray[d, c]) drift_tgray[d][c] = '0;
    foreach (adc_code[c]) begin adc_code[c] = 0; adc_cut[c] = 8'd100; end
    foreach (reg_data[r]) reg_data[r] = 0;
    reset_dut();
    // normalizers: address {name[1:0], 6 data bits}; identity or zero on every page
    for (int a = 0; a < 256; a++) begin
      load(0, 1, a, 16'(a[5:0]) << 10);  load(0, 0, a, 16'(a[5:0]) << 4);   // N3a = Y3
      load(1, 1, a, 16'd0);              load(1, 0, a, 16'd0);              // N3b = 0
      load(2, 1, a, 16'd0);              load(2, 0, a, 16'd0);              // N4a = 0
      load(3, 1, a, 16'(a[5:0]) << 10);  load(3, 0, a, 16'(a[5:0]) << 4);   // N4b = Y4
      load(4, 0, a, (a[1:0] == 2'b11) ? 16'h2000 : 16'h4000);              // road test
      load(5, 0, a, a[7] ? 16'(a[6:0]) : logt(int'(a[6:0])));                    // log / identity
      load(6, 0, a, a[7] ? 16'(a[6:0]) : logt(int'(a[6:0])));
      load(7, 0, a, (a == 0) ? 16'h8000 : 16'h9000);                       // Y_y cut
      load(8, 0, a, (a[1:0] == 2'b10 && !a[2]) ? 16'ha001 : 16'ha000);     // parametrization
      load(9, 0, a, (!a[0] && a[1]) ? 16'h0001 : (a[0] && a[1] && a[4]) ? 16'h1002 : 16'h0000);
    end
    for (int a = 0; a < 256; a++) begin                                  // sigma: A_i = i + 1
      int t;
      t = 0;
      for (int i = 0; i < 8; i++) if (a[i]) t += i + 1;
      load(10, 0, a, 16'(t));
    end
    @(negedge clk) tbl_we = 0;


    for (int e = 0; e < NE; e++) begin
      int ntrk, ngood;
      logic [15:0] p3[$], p4[$];
      logic [1023:0] mh [2];
      logic [31:0] dh [4];
      logic [5:0]  tb [4][32];
      logic [7:0]  code [8];
      logic [15:0] rg [4];
      logic [11:0] ids;
      mh[0] = '0; mh[1] = '0;
      foreach (dh[d]) dh[d] = '0;
      ntrk = (e == 5) ? 0 : (e == 2 || e == 4) ? 1 : (e == 7 || e == 15) ? 8 : $urandom_range(0, 3);
      for (int t = 0; t < ntrk; t++) begin
        int w3, w4;
        w3 = $urandom_range(1, 30); w4 = $urandom_range(1, 30);
        dh[0][w3] = 1; if ($urandom_range(1) != 0) dh[1][w3] = 1;
        dh[2][w4] = 1; if ($urandom_range(1) != 0) dh[3][w4 - 1] = 1;
        mh[0][w3] = 1; mh[1][w4] = 1;
      end
      for (int d = 0; d < 4; d++)
        for (int k = 0; k < ((e == 7 || e == 15) ? 10 : (e == 2 || e == 4) ? 0 : $urandom_range(0, 2)); k++) dh[d][$urandom_range(31)] = 1;
      for (int k = 0; k < $urandom_range(0, 3); k++) mh[$urandom_range(1)][$urandom_range(1023)] = 1;
      foreach (tb[d, c]) tb[d][c] = 6'($urandom);
      foreach (code[c]) code[c] = 8'($urandom);
      foreach (rg[r]) rg[r] = 16'($urandom);

      // model: candidates and trigger
      positions(dh[0], dh[1], p3);
      positions(dh[2], dh[3], p4);
      ngood = 0;
      ncand = 0;
      pw = {};
      ev_n34[e] = p3.size() * p4.size();
      foreach (p3[i]) foreach (p4[j]) begin
        if (mh[0][p3[i][15:6]] && mh[1][p4[j][15:6]]) begin
          logic [15:0] lp, yy;
          lp = logt(int'(p3[i][12:6])) - logt(int'(p4[j][12:6]));
          yy = 16'(p3[i][12:6]) - 16'(p4[j][12:6]);
          if (lp <= 16'h7fff && yy[15:8] == 0) ngood++;
          ncand++;
          pw.push_back(mk_word(4'ha, (lp <= 16'h7fff && yy[15:8] == 0) ? 16'ha001 : 16'ha000));
        end
      end
      if (ncand > n_cand_max) n_cand_max = ncand;
      ids = (ngood >= 1 ? 12'h001 : 12'h0) | (ngood >= 2 ? 12'h002 : 12'h0);
      exp_rd.push_back(ngood >= 1);
      if (ngood >= 1) begin
        exp_hdr.push_back(mk_word(4'd15, {4'd0, ids}));
        pw.sort() with (item.data);
        foreach (pw[i]) exp_hdr.push_back(pw[i]);
        exp_hdr.push_back(mk_cmpl(4'd15, 16'(e)));
        for (int m = 0; m < 2; m++) begin
          for (int w = 0; w < 1024; w++) if (mh[m][w]) exp_ro[m].push_back(mk_word(4'(8 + m), 16'(w)));
          exp_ro[m].push_back(mk_cmpl(4'(8 + m), 16'(e[7:0])));
        end
        for (int d = 0; d < 4; d++) begin
          for (int c = 0; c < 32; c++) if (dh[d][c]) exp_ro[2+d].push_back(mk_word(4'(d), {10'(c), tb[d][c]}));
          exp_ro[2+d].push_back(mk_cmpl(4'(d), 16'(e[7:0])));
        end
        for (int c = 0; c < 8; c++) if (code[c] > 8'd100) exp_ro[6].push_back(mk_word(4'd13, {5'd0, 3'(c), code[c]}));
        exp_ro[6].push_back(mk_cmpl(4'd13, 16'(e[7:0])));
        foreach (rg[r]) exp_ro[7].push_back(mk_word(4'd14, rg[r]));
        exp_ro[7].push_back(mk_cmpl(4'd14, 16'(e[7:0])));
      end

      // apply the event to the detector and strobe the readout
      while (busy) @(negedge clk);
      if (e < 7) while (got_cmd.size() < e) @(negedge clk);   // isolated events
      @(negedge clk);
      mwpc_hits = mh; drift_hit = dh;
      foreach (tb[d, c]) drift_tgray[d][c] = tb[d][c] ^ (tb[d][c] >> 1);
      adc_code = code; reg_data = rg;
      strobe = 1;
      ev_strobe_t[e] = int'($time / 10);
      @(negedge clk) strobe = 0;
    end
    while (got_cmd.size() < NE) @(posedge clk);
    repeat (3000) @(posedge clk);

    // eight linear combinations through the sigma module and the serial adder
    sg_a0 = 32'd1000;
    for (int n = 0; n < 8; n++) begin
      logic signed [15:0] xv [8];
      logic [31:0] y;
      y = 32'd1000;
      for (int i = 0; i < 8; i++) begin xv[i] = 16'((n * 37 + i * 53) % 201) - 16'sd100; y += 32'(i + 1) * 32'(xv[i]); end
      sg_c = 16'(n * 12345 + 777);
      for (int b = 15; b >= 0; b--) begin
        @(negedge clk);
        sg_x_start = (b == 15);
        for (int i = 0; i < 8; i++) sg_x_bits[i] = xv[i][b];
      end
      @(negedge clk) sg_x_start = 0;
      repeat (20) @(negedge clk);
      chk(sg_par.size() == 1 && sg_par[0] == y[15:0], $sformatf("sigma result %0d: %0d words, %h expected %h", n, sg_par.size(), sg_par.size() != 0 ? sg_par[0] : 16'd0, y[15:0]));
      chk(sg_ser.size() == 1 && sg_ser[0] == y[15:0], $sformatf("sigma serial result %0d: %0d, %h", n, sg_ser.size(), sg_ser.size() != 0 ? sg_ser[0] : 16'd0));
      chk(sg_sum.size() == 1 && sg_sum[0] == y[15:0] + sg_c, $sformatf("serial adder sum %0d", n));
      sg_par.delete(); sg_ser.delete(); sg_sum.delete();
    end

    chk(got_cmd.size() == NE, "one command per event");
    foreach (exp_rd[e]) chk(got_cmd[e] == exp_rd[e], $sformatf("event %0d: read=%0d expected %0d", e, got_cmd[e], exp_rd[e]));
    // the track parameters of an event may arrive in any order: sort them
    begin
      word_t run[$], norm[$];
      foreach (got_hdr[i]) begin
        if (got_hdr[i].name == 4'd15) begin
          run.sort() with (item.data);
          foreach (run[k]) norm.push_back(run[k]);
          run = {};
          norm.push_back(got_hdr[i]);
        end else begin
          run.push_back(got_hdr[i]);
          n_hdr_par++;
        end
      end
      foreach (run[k]) norm.push_back(run[k]);
      cmpq(norm, exp_hdr, "header with track parameters");
    end
    chk(n_cand_max <= 256, $sformatf("at most 256 track parameters per event (%0d)", n_cand_max));
    chk(n_hdr_par > 0, "track parameters read out");
    for (int k = 0; k < 8; k++) cmpq(got_ro[k], exp_ro[k], $sformatf("ring buffer %0d readout", k));
    $display("mechanisms: road pass %0d fail %0d, retrieved %0d, page copies %0d, wire pairs %0d singles %0d, equal merge keys %0d",
             n_pass, n_fail, n_retr, n_copy, n_pair, n_single, n_eq);
    $display("            logP cut in %0d out %0d, Yy cut ok %0d bad %0d, track pairs %0d singles %0d",
             n_cut_in, n_cut_out, n_yy_ok, n_yy_bad, n_tpair, n_tsing);
    $display("            read %0d skip %0d, read-bus holds %0d, loop throttle %0d, map erase %0d, loop buffer %0d, holds %0d, readout holds %0d",
             n_read, n_skip, n_cmdhold, n_lc_throttle, n_erase, n_buf, n_hold, n_ro_hold);
    for (int e = 0; e < NE; e++) $write("%0d ", ev_cmd_t[e] - ev_strobe_t[e]);
    $display(" : clocks from strobe to the read/skip decision per event");
    for (int e = 0; e < NE; e++) $write("%0d ", ev_n34[e]);
    $display(" : Y3 x Y4 position pairs per event");
    // events before the large event 7 meet an idle processor (each waits for
    // the decision on the one before); those with few
    // track candidates (at most 6 Y3 x Y4 pairs) must be decided within
    // 2 us at 40 MHz, the dead time of the original trigger
    n_small = 0;
    for (int e = 0; e < 7; e++) if (ev_n34[e] <= 6) begin
      n_small++;
      chk(ev_cmd_t[e] - ev_strobe_t[e] <= 80, $sformatf("event %0d decided in %0d clocks", e, ev_cmd_t[e] - ev_strobe_t[e]));
    end
    chk(n_small >= 2, "small isolated events timed");
    chk(n_pass > 0, "road test passed");          chk(n_fail > 0, "road test failed");
    chk(n_retr > 0, "list counter retrieval");    chk(n_copy > 0, "page copies");
    chk(n_pair > 0, "wire pairs");                chk(n_single > 0, "single wires");
    chk(n_eq > 0, "equal keys in ordered merge");
    chk(n_cut_in > 0, "log P inside cut");        chk(n_cut_out > 0, "log P outside cut");
    chk(n_yy_ok > 0, "Y_y cut passed");           chk(n_yy_bad > 0, "Y_y cut failed");
    chk(n_tpair > 0, "track pairs");              chk(n_tsing > 0, "track singles");
    chk(n_read > 0, "events read");               chk(n_skip > 0, "events skipped");
    chk(n_cmdhold > 0, "read bus hold");
    chk(n_erase > 0, "map erase");                chk(n_buf > 0, "loop buffer in use");
    chk(n_sigma == 8, "sigma results");          chk(n_sadd == 8, "serial adder sums");
    chk(n_hold > 0, "hold on a cable");           chk(n_ro_hold > 0, "readout hold");
    finish_tb();
  end
endmodule
