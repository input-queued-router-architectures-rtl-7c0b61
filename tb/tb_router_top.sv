// tb_router_top: end-to-end test of both routers in router_top, at 4 ports
// and 64-cell virtual output queues (256-cell CIOQ queues).
//
// Both routers get independent random packet traffic of 1..24 cells: uniform
// load of about 0.6 in cell mode, then in packet mode (the mode inputs are
// switched while traffic flows), then a hot-spot overload and a phase where every input
// sends to output 0. Scoreboards check
// every delivered packet. Each mechanism of the design must be seen at least
// once, and how often it happened is printed:
//   IQ   - whole-packet discard at an input, held packet-mode match,
//          interleaved cells at an output in cell mode, scheduler mode switch
//   CIOQ - two cells into one output queue in a slot, deferral in each of
//          the two FIFO-2 executions, cell loss at a full output queue with
//          the damaged packet discarded by reassembly, input discard.
module tb_router_top;
  import switch_pkg::*;
  localparam int unsigned N = 4, L = 64, MAXP = 24;

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
  logic [1:0] ia_d [N], oa_src [N], ib_d [N], ob_src [N];
  logic [CELL_DATA_W-1:0] ia_dat [N], oa_dat [N], ib_dat [N], ob_dat [N];

  traffic_gen #(.N(N), .MAX_LEN(MAXP)) u_gen_a (
    .clk, .rst_n, .enable(gen_en), .hot, .p_start, .in_valid(ia_v), .in_sop(ia_s),
    .in_eop(ia_e), .in_dest(ia_d), .in_data(ia_dat), .packets_sent(sent_a));
  traffic_gen #(.N(N), .MAX_LEN(MAXP)) u_gen_b (
    .clk, .rst_n, .enable(gen_en), .hot, .p_start, .in_valid(ib_v), .in_sop(ib_s),
    .in_eop(ib_e), .in_dest(ib_d), .in_data(ib_dat), .packets_sent(sent_b));

  router_top #(.N(N), .L(L)) dut (
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
  logic [1:0] x_prev [N];
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
    #3000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks + ca + cb, failures + fa + fb);
    $finish;
  end

  initial begin
    iq_mode = CELL_MODE; cioq_mode = CELL_MODE;
    gen_en = 0; hot = 0; p_start = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    repeat (2) @(posedge clk);
    p_start = 7000; gen_en = 1;
    repeat (4000) @(posedge clk);
    iq_mode = PACKET_MODE;
    // the CIOQ router is switched while it is empty
    gen_en = 0;
    repeat (2000) @(posedge clk);
    cioq_mode = PACKET_MODE;
    gen_en = 1;
    repeat (4000) @(posedge clk);
    hot = 1; p_start = 65536;
    repeat (3000) @(posedge clk);
    hot = 2;                     // every input to output 0
    repeat (1500) @(posedge clk);
    gen_en = 0;
    repeat (8000) @(posedge clk);

    check(u_chk_a.outstanding() == 0 && ma == 0 && n_loss_a == 0, "IQ: every admitted packet delivered, no loss inside");
    check(u_chk_b.outstanding() + mb <= n_oloss, "CIOQ: a packet is missing only after a cell loss");
    check(da > 500 && db > 500, "both routers delivered traffic");
    check(n_drop_a > 0, "IQ: whole-packet discard at an input");
    check(n_held > 0, "IQ: held packet-mode match");
    check(n_il_cell > 0, "IQ: interleaved cells at an output in cell mode");
    check(n_switch > 0, "IQ: mode switch under traffic");
    check(n_pass2 > 0, "CIOQ: two cells into one output queue in a slot");
    check(n_def0 > 0 && n_def1 > 0, "CIOQ: deferral in both executions");
    check(n_oloss > 0 && n_disc_b > 0, "CIOQ: cell loss and discard of the damaged packet");
    check(n_drop_b > 0, "CIOQ: whole-packet discard at an input");
    $display("IQ   delivered=%0d input-discards=%0d held=%0d interleaved-cells=%0d mode-switches=%0d",
             da, n_drop_a, n_held, n_il_cell, n_switch);
    $display("CIOQ delivered=%0d pass2=%0d deferred=%0d/%0d cell-losses=%0d discards=%0d input-discards=%0d missing=%0d",
             db, n_pass2, n_def0, n_def1, n_oloss, n_disc_b, n_drop_b, mb);
    $display("TB_RESULT checks=%0d failures=%0d", checks + ca + cb, failures + fa + fb);
    $finish;
  end
endmodule
