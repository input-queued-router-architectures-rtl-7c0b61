// tb_router_top_full: both routers at their full size (16 ports, 30000-cell
// virtual output queues, 480000-cell CIOQ queues, 192-cell maximum packet).
//
// Random packets of 1..192 cells (uniform length, geometric idle time) are
// sent at a load of about 0.5 with uniform destinations; the IQ router runs
// iSLIP in cell mode for the first half and in packet mode for the second,
// the CIOQ router (FF-PM221) runs FIFO-2 in packet mode. After the sources
// stop, every admitted packet must have been delivered intact and in order
// per input/output pair, with no discard or loss anywhere, since the queues
// are far larger than this traffic needs.
module tb_router_top_full;
  import switch_pkg::*;
  localparam int unsigned N = 16, MAXP = MAX_PKT_CELLS;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  sched_mode_e iq_mode, cioq_mode;
  logic gen_en;
  logic [1:0] hot;
  int unsigned p_start, sent_a, sent_b;

  logic [N-1:0] ia_v, ia_s, ia_e, oa_v, oa_s, oa_e, a_drop, a_vl, a_ol, a_od, a_held;
  logic [N-1:0] ib_v, ib_s, ib_e, ob_v, ob_s, ob_e, b_drop, b_il, b_ol, b_rl, b_rd, b_p2;
  logic [1:0] b_def;
  logic [3:0] ia_d [N], oa_src [N], ib_d [N], ob_src [N];
  logic [CELL_DATA_W-1:0] ia_dat [N], oa_dat [N], ib_dat [N], ob_dat [N];

  traffic_gen #(.N(N), .MAX_LEN(MAXP)) u_gen_a (
    .clk, .rst_n, .enable(gen_en), .hot, .p_start, .in_valid(ia_v), .in_sop(ia_s),
    .in_eop(ia_e), .in_dest(ia_d), .in_data(ia_dat), .packets_sent(sent_a));
  traffic_gen #(.N(N), .MAX_LEN(MAXP)) u_gen_b (
    .clk, .rst_n, .enable(gen_en), .hot, .p_start, .in_valid(ib_v), .in_sop(ib_s),
    .in_eop(ib_e), .in_dest(ib_d), .in_data(ib_dat), .packets_sent(sent_b));

  router_top dut (
    .clk, .rst_n,
    .iq_mode, .iq_in_valid(ia_v), .iq_in_sop(ia_s), .iq_in_eop(ia_e), .iq_in_dest(ia_d),
    .iq_in_data(ia_dat), .iq_out_valid(oa_v), .iq_out_sop(oa_s), .iq_out_eop(oa_e),
    .iq_out_data(oa_dat), .iq_out_src(oa_src), .iq_ism_drop(a_drop), .iq_voq_lost(a_vl),
    .iq_orm_lost(a_ol), .iq_orm_discard(a_od), .iq_held_match(a_held),
    .cioq_mode, .cioq_in_valid(ib_v), .cioq_in_sop(ib_s), .cioq_in_eop(ib_e),
    .cioq_in_dest(ib_d), .cioq_in_data(ib_dat), .cioq_out_valid(ob_v), .cioq_out_sop(ob_s),
    .cioq_out_eop(ob_e), .cioq_out_data(ob_dat), .cioq_out_src(ob_src),
    .cioq_ism_drop(b_drop), .cioq_in_lost(b_il), .cioq_out_lost(b_ol),
    .cioq_orm_lost(b_rl), .cioq_orm_discard(b_rd), .cioq_deferred(b_def), .cioq_pass2(b_p2));

  logic [N-1:0] adm_a, adm_b;
  for (genvar i = 0; i < N; i++) begin : g_adm
    assign adm_a[i] = dut.u_iq.seg_valid[i] && dut.u_iq.seg_cell[i].first;
    assign adm_b[i] = dut.u_cioq.g_in[i].sv[0] && dut.u_cioq.g_in[i].sc[0].first;
  end

  int ca, fa, da, dra, ila, ma, cb, fb, db, drb, ilb, mb;
  router_checker #(.N(N)) u_chk_a (
    .clk, .rst_n, .in_valid(ia_v), .in_sop(ia_s), .in_eop(ia_e), .in_dest(ia_d), .in_data(ia_dat),
    .adm_start(adm_a), .adm_drop(a_drop), .out_valid(oa_v), .out_sop(oa_s), .out_eop(oa_e),
    .out_data(oa_dat), .out_src(oa_src), .checks(ca), .failures(fa), .delivered(da),
    .dropped(dra), .interleaved(ila), .missing(ma));
  router_checker #(.N(N)) u_chk_b (
    .clk, .rst_n, .in_valid(ib_v), .in_sop(ib_s), .in_eop(ib_e), .in_dest(ib_d), .in_data(ib_dat),
    .adm_start(adm_b), .adm_drop(b_drop), .out_valid(ob_v), .out_sop(ob_s), .out_eop(ob_e),
    .out_data(ob_dat), .out_src(ob_src), .checks(cb), .failures(fb), .delivered(db),
    .dropped(drb), .interleaved(ilb), .missing(mb));

  // mechanism counters
  int n_drop_a, n_held, n_il_cell, n_switch, n_loss_a;
  int n_pass2, n_def0, n_def1, n_oloss, n_disc_b, n_drop_b;
  logic [N-1:0] x_busy;
  logic [3:0] x_prev [N];
  sched_mode_e prev_mode;
  always @(posedge clk) begin
    if (!rst_n) begin
      n_drop_a = 0; n_held = 0; n_il_cell = 0; n_switch = 0; n_loss_a = 0;
      n_pass2 = 0; n_def0 = 0; n_def1 = 0; n_oloss = 0; n_disc_b = 0; n_drop_b = 0;
      x_busy = '0; prev_mode = iq_mode;
    end else begin
      n_drop_a += $countones(a_drop);
      n_held   += $countones(a_held);
      n_loss_a += $countones(a_vl | a_ol | a_od);
      if (iq_mode != prev_mode) n_switch++;
      prev_mode = iq_mode;
      for (int j = 0; j < N; j++) begin
        if (dut.u_iq.x_valid[j]) begin
          if (x_busy[j] && dut.u_iq.x_src[j] != x_prev[j]) n_il_cell++;
          if (dut.u_iq.x_cell[j].first) begin
            x_busy[j] = !dut.u_iq.x_cell[j].last;
            x_prev[j] = dut.u_iq.x_src[j];
          end else if (dut.u_iq.x_cell[j].last && dut.u_iq.x_src[j] == x_prev[j]) begin
            x_busy[j] = 1'b0;
          end
        end
      end
      n_pass2  += $countones(b_p2);
      if (b_def[0]) n_def0++;
      if (b_def[1]) n_def1++;
      n_oloss  += $countones(b_ol | b_il | b_rl);
      n_disc_b += $countones(b_rd);
      n_drop_b += $countones(b_drop);
    end
  end

  task automatic check(bit c, string m);
    checks++;
    if (!c) begin failures++; $display("CHECK FAILED: %s", m); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks + ca + cb, failures + fa + fb);
    $finish;
  end

  initial begin
    iq_mode = CELL_MODE; cioq_mode = PACKET_MODE;
    gen_en = 0; hot = 0; p_start = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    repeat (2) @(posedge clk);
    p_start = 672; gen_en = 1;      // mean idle 96.5 slots = mean packet: load 0.5
    repeat (3000) @(posedge clk);
    iq_mode = PACKET_MODE;
    repeat (3000) @(posedge clk);
    gen_en = 0;
    repeat (4000) @(posedge clk);

    check(u_chk_a.outstanding() == 0 && ma == 0, "IQ: every admitted packet delivered");
    check(u_chk_b.outstanding() == 0 && mb == 0, "CIOQ: every admitted packet delivered");
    check(da > 100 && db > 100, "both routers delivered traffic");
    check(n_drop_a == 0 && n_drop_b == 0 && n_loss_a == 0 && n_oloss == 0, "no discard or loss");
    check(n_held > 0 && n_pass2 > 0, "packet-mode holds and speed-up used");
    $display("IQ delivered=%0d held=%0d | CIOQ delivered=%0d pass2=%0d", da, n_held, db, n_pass2);
    $display("TB_RESULT checks=%0d failures=%0d", checks + ca + cb, failures + fa + fb);
    $finish;
  end
endmodule
