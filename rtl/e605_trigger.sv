// e605_trigger: data driven trigger processor for the E605 spectrometer.
//
// Readout. Two MWPC planes (Y1, Y2, in front of the analyzing magnet), four
// drift chamber planes (staggered pairs Y3a/Y3b and Y4a/Y4b behind it), an
// 8-channel ADC and a block of coincidence registers are read out on
// `strobe`. Each readout segment fills its own ring buffer; the buffers feed
// the processor and later read out or skip the event in unison.
//
// Processor (one event block at a time, all stages concurrent):
//  * Y3a/Y3b and Y4a/Y4b are merged in wire order (ordered_merge) and
//    adjacent hits are paired (associate, pair mode), giving positions in
//    half-wire units: data = {wire[9:0], half, 5'b0}.
//  * Y1 and Y2 hits are written into two maps (read in the 9-cell form).
//  * Y3 and Y4 positions are stored in lists L3, L4 and counted by a binary
//    index generator, which emits every (i3, i4) pair (name 1). The pairs pass
//    the list counter LC and a page generator into the read ports of L3, L4.
//  * Four normalizers, paged by the word name, form linear combinations of
//    Y3 and Y4; two adders give both MWPC plane projections at once
//    (name 1) or, on the second pass, the quantities for the momentum
//    (name 2) and for the Y_y cut (name 3).
//  * Name 1: the projections read the maps (9-cell roads); a binary table
//    turns the two roads into a test, name 2 = passed, 4 = failed; through a
//    buffer the result returns to LC's read port. A passed test retrieves the
//    index pair, which re-enters the loop as name 2 and is copied to names 2
//    and 3 by the page generator.
//  * Names 2 and 3 leave the loop: two log tables and a subtracter give
//    log P (name 2), cut by `cut` against cut_lo/cut_hi; name 3 is cut by a
//    table on Y_y. Both cuts are buffered and joined by a binary table into
//    one parametrization word per track candidate (stored in two lists).
//  * A unary index generator forms all track pairs and singles; a binary
//    table makes the trigger word (12 id bits, 4-bit frequency) and the
//    event generator commands read or skip on the read bus. The
//    parametrization words also go to the event generator, which sends
//    them in the header of a read event.
// Read-out events leave on ro[0..7] (Y1, Y2, Y3a, Y3b, Y4a, Y4b, ADC,
// registers), the event header (id bits, track parameters, event count) on
// `hdr`.
//
// Beside the trigger stand one sigma_module (the bit-serial linear
// combination module of the later track-fit processor) and one
// serial_adder8 (eight bit-serial additions), each with its own ports.
//
// All tables are loaded through tbl_we/tbl_tgt/tbl_hi/tbl_addr/tbl_data:
// tgt 0..3 normalizers N3a, N3b, N4a, N4b (tbl_hi: F table), 4 road table,
// 5/6 log tables, 7 Y_y table, 8 parametrization table, 9 trigger table,
// 10 sigma table. Names, patches and modes are fixed below (the pre-set
// registers of the original modules). The module chain follows the
// original trigger; names, patch choices and the exact join of the cuts are
// this design's own.
module e605_trigger
  import ddp_pkg::*;
#(
  parameter int unsigned NWIRES   = 1024,
  parameter int unsigned DRIFT_CH = 32,
  parameter int unsigned NREG     = 4,
  parameter int unsigned RB_DEPTH = 1024
) (
  input  logic                clk,
  input  logic                rst_n,
  // readout
  input  logic                strobe,
  input  logic [NWIRES-1:0]   mwpc_hits [2],
  input  logic [DRIFT_CH-1:0] drift_hit [4],
  input  logic [5:0]          drift_tgray [4][DRIFT_CH],
  input  logic [7:0]          adc_code [8],
  input  logic [7:0]          adc_cut [8],
  input  logic [15:0]         reg_data [NREG],
  input  logic [7:0]          max_words,
  output logic                busy,
  // configuration
  input  logic                map_ordered,
  input  logic [15:0]         cut_lo,
  input  logic [15:0]         cut_hi,
  input  logic                tbl_we,
  input  logic [3:0]          tbl_tgt,
  input  logic                tbl_hi,
  input  logic [7:0]          tbl_addr,
  input  logic [15:0]         tbl_data,
  // read bus output
  output word_t               ro [8],
  input  logic [7:0]          ro_hold,
  output word_t               hdr,
  input  logic                hdr_hold,
  // sigma module
  input  logic [7:0]          sg_x_bits,
  input  logic                sg_x_start,
  input  logic [31:0]         sg_a0,
  output logic                sg_busy,
  output word_t               sg_out,
  input  logic                sg_out_hold,
  output logic                sg_y_bit,
  output logic                sg_y_start,
  // serial adder (eight bit-serial pairs)
  input  logic                sa_start,
  input  logic [7:0]          sa_a,
  input  logic [7:0]          sa_b,
  output logic [7:0]          sa_s
);
  // names
  localparam logic [3:0] NM_PAIR = 4'd1, NM_PASS = 4'd2;  // failed road test: name 4
  localparam logic [3:0] NM_LO = 4'd5, NM_IN = 4'd6, NM_HI = 4'd7;
  localparam logic [3:0] NM_TPAIR = 4'd11, NM_TSING = 4'd12, NM_HDR = 4'd15;
  // patches (selector per address bit, see normalizer / table modules)
  localparam logic [5:0] SEL_NF [8]   = '{10, 11, 12, 13, 14, 15, 16, 17};
  localparam logic [5:0] SEL_NG [8]   = '{4, 5, 6, 7, 8, 9, 16, 17};
  localparam logic [5:0] SEL_ROAD [8] = '{11, 31, 0, 0, 0, 0, 0, 0};
  localparam logic [5:0] SEL_LOG [8]  = '{6, 7, 8, 9, 10, 11, 12, 16};
  localparam logic [5:0] SEL_YY [8]   = '{8, 9, 10, 11, 12, 13, 14, 15};
  localparam logic [5:0] SEL_PAR [8]  = '{36, 37, 16, 31, 32, 33, 34, 35};
  localparam logic [5:0] SEL_TRIG [8] = '{36, 20, 21, 22, 0, 1, 2, 3};

  // ---------------------------------------------------------------- readout
  word_t enc [8];
  logic  enc_hold [8];
  logic [7:0] rb_cmd_hold;
  logic  [7:0] enc_busy;
  word_t rbp [8];
  logic  rbp_hold [8];
  logic  cmd_valid, cmd_read, cmd_bus_hold;

  for (genvar m = 0; m < 2; m++) begin : g_mwpc
    mwpc_encoder #(.NWIRES(NWIRES)) u_enc (.clk, .rst_n, .strobe, .hits(mwpc_hits[m]),
      .cfg_crate(4'(8 + m)), .cfg_max_words(max_words), .busy(enc_busy[m]),
      .out(enc[m]), .out_hold(enc_hold[m]));
  end
  for (genvar d = 0; d < 4; d++) begin : g_drift
    drift_encoder #(.NCH(DRIFT_CH)) u_enc (.clk, .rst_n, .strobe, .hit(drift_hit[d]),
      .tgray(drift_tgray[d]), .cfg_plane(4'(d)), .cfg_wire_base(10'd0),
      .cfg_max_words(max_words), .busy(enc_busy[2+d]), .out(enc[2+d]),
      .out_hold(enc_hold[2+d]));
  end
  adc_readout u_adc (.clk, .rst_n, .strobe, .code(adc_code), .cfg_cut(adc_cut),
    .cfg_name(4'd13), .busy(enc_busy[6]), .out(enc[6]), .out_hold(enc_hold[6]));
  register_readout #(.NREG(NREG)) u_reg (.clk, .rst_n, .strobe, .regs(reg_data),
    .cfg_name(4'd14), .busy(enc_busy[7]), .out(enc[7]), .out_hold(enc_hold[7]));

  assign busy         = |enc_busy;
  assign cmd_bus_hold = |rb_cmd_hold;

  for (genvar r = 0; r < 8; r++) begin : g_rb
    ring_buffer #(.DEPTH(RB_DEPTH)) u_rb (.clk, .rst_n, .wr(enc[r]), .wr_hold(enc_hold[r]),
      .proc(rbp[r]), .proc_hold(rbp_hold[r]), .ro(ro[r]), .ro_hold(ro_hold[r]),
      .cmd_valid, .cmd_read, .cmd_bus_hold, .cmd_hold(rb_cmd_hold[r]));
  end
  // ADC and register segments are read out but do not feed this trigger
  assign rbp_hold[6] = 1'b0;
  assign rbp_hold[7] = 1'b0;

  // ------------------------------------------------- wire pairs Y3 and Y4
  word_t om3, om4, y3, y4;
  logic  om3_h, om4_h, y3_h, y4_h;

  ordered_merge u_om3 (.clk, .rst_n, .a(rbp[2]), .a_hold(rbp_hold[2]), .b(rbp[3]),
    .b_hold(rbp_hold[3]), .out(om3), .out_hold(om3_h), .cfg_mask(16'hffc0),
    .cfg_descend(1'b0), .cfg_eq_both(1'b1), .cfg_eq_name(4'd0));
  ordered_merge u_om4 (.clk, .rst_n, .a(rbp[4]), .a_hold(rbp_hold[4]), .b(rbp[5]),
    .b_hold(rbp_hold[5]), .out(om4), .out_hold(om4_h), .cfg_mask(16'hffc0),
    .cfg_descend(1'b0), .cfg_eq_both(1'b1), .cfg_eq_name(4'd0));
  associate u_as3 (.clk, .rst_n, .in(om3), .in_hold(om3_h), .out(y3), .out_hold(y3_h),
    .cfg_shift(4'd6), .cfg_thr(16'd1), .cfg_gt(1'b0), .cfg_pair(1'b1),
    .cfg_name_assoc(4'd0), .cfg_name_single(4'd0));
  associate u_as4 (.clk, .rst_n, .in(om4), .in_hold(om4_h), .out(y4), .out_hold(y4_h),
    .cfg_shift(4'd6), .cfg_thr(16'd1), .cfg_gt(1'b0), .cfg_pair(1'b1),
    .cfg_name_assoc(4'd0), .cfg_name_single(4'd0));

  // ---------------------------------------------------- binary loop
  word_t y3l, y3i, y4l, y4i, pairs, lco, pgo, rd3, rd4, l3o, l4o;
  logic  y3l_h, y3i_h, y4l_h, y4i_h, pairs_h, lco_h, pgo_h, rd3_h, rd4_h, l3o_h, l4o_h;
  word_t l3a, l3b, l4a, l4b, n3a, n3b, n4a, n4b, suma, sumb;
  logic  l3a_h, l3b_h, l4a_h, l4b_h, n3a_h, n3b_h, n4a_h, n4b_h, suma_h, sumb_h;
  word_t pr1, pr2, dsa, dsb, m1o, m2o, road, roadb;
  logic  pr1_h, pr2_h, dsa_h, dsb_h, m1o_h, m2o_h, road_h, roadb_h;

  ddp_branch u_f3 (.clk, .rst_n, .in(y3), .in_hold(y3_h), .out0(y3l), .out0_hold(y3l_h),
    .out1(y3i), .out1_hold(y3i_h), .cfg_mask0(16'hffff), .cfg_mask1(16'hffff));
  ddp_branch u_f4 (.clk, .rst_n, .in(y4), .in_hold(y4_h), .out0(y4l), .out0_hold(y4l_h),
    .out1(y4i), .out1_hold(y4i_h), .cfg_mask0(16'hffff), .cfg_mask1(16'hffff));

  index_gen_binary u_big (.clk, .rst_n, .a(y3i), .a_hold(y3i_h), .b(y4i), .b_hold(y4i_h),
    .out(pairs), .out_hold(pairs_h), .cfg_name(NM_PAIR));

  list_counter #(.MAX_OUT(64)) u_lc (.clk, .rst_n, .wr(pairs), .wr_hold(pairs_h),
    .rd(roadb), .rd_hold(roadb_h), .out(lco), .out_hold(lco_h),
    .cfg_wr_name(NM_PAIR), .cfg_rd_name(NM_PASS));

  page_gen u_pg (.clk, .rst_n, .in(lco), .in_hold(lco_h), .out(pgo), .out_hold(pgo_h),
    .cfg_name(NM_PASS), .cfg_copies(4'd2));

  ddp_branch u_fp (.clk, .rst_n, .in(pgo), .in_hold(pgo_h), .out0(rd3), .out0_hold(rd3_h),
    .out1(rd4), .out1_hold(rd4_h), .cfg_mask0(16'hffff), .cfg_mask1(16'hffff));

  list_index #(.IDX_LSB(8)) u_l3 (.clk, .rst_n, .wr(y3l), .wr_hold(y3l_h), .rd(rd3),
    .rd_hold(rd3_h), .out(l3o), .out_hold(l3o_h));
  list_index #(.IDX_LSB(0)) u_l4 (.clk, .rst_n, .wr(y4l), .wr_hold(y4l_h), .rd(rd4),
    .rd_hold(rd4_h), .out(l4o), .out_hold(l4o_h));

  ddp_branch u_fl3 (.clk, .rst_n, .in(l3o), .in_hold(l3o_h), .out0(l3a), .out0_hold(l3a_h),
    .out1(l3b), .out1_hold(l3b_h), .cfg_mask0(16'hffff), .cfg_mask1(16'hffff));
  ddp_branch u_fl4 (.clk, .rst_n, .in(l4o), .in_hold(l4o_h), .out0(l4a), .out0_hold(l4a_h),
    .out1(l4b), .out1_hold(l4b_h), .cfg_mask0(16'hffff), .cfg_mask1(16'hffff));

  logic tw [11];
  for (genvar t = 0; t < 11; t++) begin : g_twe
    assign tw[t] = tbl_we && tbl_tgt == 4'(t);
  end

  normalizer u_n3a (.clk, .rst_n, .in(l3a), .in_hold(l3a_h), .out(n3a), .out_hold(n3a_h),
    .cfg_sel_hi(SEL_NF), .cfg_sel_lo(SEL_NG), .tbl_we(tw[0]), .tbl_sel(tbl_hi), .tbl_addr,
    .tbl_data);
  normalizer u_n3b (.clk, .rst_n, .in(l3b), .in_hold(l3b_h), .out(n3b), .out_hold(n3b_h),
    .cfg_sel_hi(SEL_NF), .cfg_sel_lo(SEL_NG), .tbl_we(tw[1]), .tbl_sel(tbl_hi), .tbl_addr,
    .tbl_data);
  normalizer u_n4a (.clk, .rst_n, .in(l4a), .in_hold(l4a_h), .out(n4a), .out_hold(n4a_h),
    .cfg_sel_hi(SEL_NF), .cfg_sel_lo(SEL_NG), .tbl_we(tw[2]), .tbl_sel(tbl_hi), .tbl_addr,
    .tbl_data);
  normalizer u_n4b (.clk, .rst_n, .in(l4b), .in_hold(l4b_h), .out(n4b), .out_hold(n4b_h),
    .cfg_sel_hi(SEL_NF), .cfg_sel_lo(SEL_NG), .tbl_we(tw[3]), .tbl_sel(tbl_hi), .tbl_addr,
    .tbl_data);

  arith_op u_adda (.clk, .rst_n, .a(n3a), .a_hold(n3a_h), .b(n4a), .b_hold(n4a_h),
    .out(suma), .out_hold(suma_h), .cfg_op(3'd0), .cfg_op_from_name(1'b0));
  arith_op u_addb (.clk, .rst_n, .a(n3b), .a_hold(n3b_h), .b(n4b), .b_hold(n4b_h),
    .out(sumb), .out_hold(sumb_h), .cfg_op(3'd0), .cfg_op_from_name(1'b0));

  // first pass (name 1) to the maps, second pass (names 2, 3) downstream
  ddp_branch u_bra (.clk, .rst_n, .in(suma), .in_hold(suma_h), .out0(pr1), .out0_hold(pr1_h),
    .out1(dsa), .out1_hold(dsa_h), .cfg_mask0(16'h0002), .cfg_mask1(16'h000c));
  ddp_branch u_brb (.clk, .rst_n, .in(sumb), .in_hold(sumb_h), .out0(pr2), .out0_hold(pr2_h),
    .out1(dsb), .out1_hold(dsb_h), .cfg_mask0(16'h0002), .cfg_mask1(16'h000c));

  ddp_map u_m1 (.clk, .rst_n, .wr(rbp[0]), .wr_hold(rbp_hold[0]), .rd(pr1), .rd_hold(pr1_h),
    .out(m1o), .out_hold(m1o_h), .cfg_ordered(map_ordered), .cfg_wide(1'b0));
  ddp_map u_m2 (.clk, .rst_n, .wr(rbp[1]), .wr_hold(rbp_hold[1]), .rd(pr2), .rd_hold(pr2_h),
    .out(m2o), .out_hold(m2o_h), .cfg_ordered(map_ordered), .cfg_wide(1'b0));

  table_binary u_troad (.clk, .rst_n, .a(m1o), .a_hold(m1o_h), .b(m2o), .b_hold(m2o_h),
    .out(road), .out_hold(road_h), .cfg_sel(SEL_ROAD), .cfg_name_from_table(1'b1),
    .tbl_we(tw[4]), .tbl_addr, .tbl_data);
  ddp_buffer u_bloop (.clk, .rst_n, .in(road), .in_hold(road_h), .out(roadb),
    .out_hold(roadb_h));

  // ---------------------------------------------------- track cuts
  word_t lga, lgb, lgp, cpin, yyin, cpo, yyo, cpb, yyb, par, part, pars, ua, ub, parg, parx;
  logic  lga_h, lgb_h, lgp_h, cpin_h, yyin_h, cpo_h, yyo_h, cpb_h, yyb_h, par_h;
  logic  part_h, pars_h, ua_h, ub_h, parg_h, parx_h;
  word_t ta, tb2, trk, tra, trb, trig;
  logic  ta_h, tb2_h, trk_h, tra_h, trb_h, trig_h;

  table_unary u_loga (.clk, .rst_n, .in(dsa), .in_hold(dsa_h), .out(lga), .out_hold(lga_h),
    .cfg_sel(SEL_LOG), .cfg_name_from_table(1'b0), .tbl_we(tw[5]), .tbl_addr, .tbl_data);
  table_unary u_logb (.clk, .rst_n, .in(dsb), .in_hold(dsb_h), .out(lgb), .out_hold(lgb_h),
    .cfg_sel(SEL_LOG), .cfg_name_from_table(1'b0), .tbl_we(tw[6]), .tbl_addr, .tbl_data);
  arith_op u_sub (.clk, .rst_n, .a(lga), .a_hold(lga_h), .b(lgb), .b_hold(lgb_h),
    .out(lgp), .out_hold(lgp_h), .cfg_op(3'd1), .cfg_op_from_name(1'b0));
  ddp_branch u_brc (.clk, .rst_n, .in(lgp), .in_hold(lgp_h), .out0(cpin), .out0_hold(cpin_h),
    .out1(yyin), .out1_hold(yyin_h), .cfg_mask0(16'h0004), .cfg_mask1(16'h0008));
  cut u_cutp (.clk, .rst_n, .in(cpin), .in_hold(cpin_h), .out(cpo), .out_hold(cpo_h),
    .cfg_lo(cut_lo), .cfg_hi(cut_hi), .cfg_name_below(NM_LO), .cfg_name_in(NM_IN),
    .cfg_name_above(NM_HI));
  table_unary u_tyy (.clk, .rst_n, .in(yyin), .in_hold(yyin_h), .out(yyo), .out_hold(yyo_h),
    .cfg_sel(SEL_YY), .cfg_name_from_table(1'b1), .tbl_we(tw[7]), .tbl_addr, .tbl_data);
  ddp_buffer u_bp (.clk, .rst_n, .in(cpo), .in_hold(cpo_h), .out(cpb), .out_hold(cpb_h));
  ddp_buffer u_by (.clk, .rst_n, .in(yyo), .in_hold(yyo_h), .out(yyb), .out_hold(yyb_h));
  table_binary u_tpar (.clk, .rst_n, .a(cpb), .a_hold(cpb_h), .b(yyb), .b_hold(yyb_h),
    .out(par), .out_hold(par_h), .cfg_sel(SEL_PAR), .cfg_name_from_table(1'b1),
    .tbl_we(tw[8]), .tbl_addr, .tbl_data);

  // ---------------------------------------------------- track pairs, trigger
  ddp_branch u_ft0 (.clk, .rst_n, .in(par), .in_hold(par_h), .out0(parg), .out0_hold(parg_h),
    .out1(parx), .out1_hold(parx_h), .cfg_mask0(16'hffff), .cfg_mask1(16'hffff));
  ddp_branch u_ft1 (.clk, .rst_n, .in(parx), .in_hold(parx_h), .out0(part), .out0_hold(part_h),
    .out1(pars), .out1_hold(pars_h), .cfg_mask0(16'hffff), .cfg_mask1(16'hffff));
  ddp_branch u_ft2 (.clk, .rst_n, .in(pars), .in_hold(pars_h), .out0(ua), .out0_hold(ua_h),
    .out1(ub), .out1_hold(ub_h), .cfg_mask0(16'hffff), .cfg_mask1(16'hffff));
  index_gen_unary u_uig (.clk, .rst_n, .in(part), .in_hold(part_h), .out(trk),
    .out_hold(trk_h), .cfg_pair_name(NM_TPAIR), .cfg_diag_name(NM_TSING));
  ddp_branch u_ft3 (.clk, .rst_n, .in(trk), .in_hold(trk_h), .out0(ta), .out0_hold(ta_h),
    .out1(tb2), .out1_hold(tb2_h), .cfg_mask0(16'hffff), .cfg_mask1(16'hffff));
  list_index #(.IDX_LSB(8)) u_lta (.clk, .rst_n, .wr(ua), .wr_hold(ua_h), .rd(ta),
    .rd_hold(ta_h), .out(tra), .out_hold(tra_h));
  list_index #(.IDX_LSB(0)) u_ltb (.clk, .rst_n, .wr(ub), .wr_hold(ub_h), .rd(tb2),
    .rd_hold(tb2_h), .out(trb), .out_hold(trb_h));
  table_binary u_ttrig (.clk, .rst_n, .a(tra), .a_hold(tra_h), .b(trb), .b_hold(trb_h),
    .out(trig), .out_hold(trig_h), .cfg_sel(SEL_TRIG), .cfg_name_from_table(1'b0),
    .tbl_we(tw[9]), .tbl_addr, .tbl_data);
  event_gen u_evg (.clk, .rst_n, .trig, .trig_hold(trig_h), .hdr, .hdr_hold, .cmd_valid,
    .cmd_read, .cmd_hold(cmd_bus_hold), .par(parg), .par_hold(parg_h), .cfg_hdr_name(NM_HDR));

  // ---------------------------------------------------- sigma module
  sigma_module u_sigma (.clk, .rst_n, .x_bits(sg_x_bits), .x_start(sg_x_start),
    .tbl_we(tw[10]), .tbl_addr, .tbl_data, .cfg_a0(sg_a0), .cfg_name(4'd0),
    .res_busy(sg_busy), .y_bit(sg_y_bit), .y_start(sg_y_start), .out(sg_out),
    .out_hold(sg_out_hold));
  serial_adder8 u_sadd (.clk, .rst_n, .start(sa_start), .a(sa_a), .b(sa_b), .s(sa_s));
endmodule
