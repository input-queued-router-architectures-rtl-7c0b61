// tb_iq_router: end-to-end test of the input-queued router at 4 ports.
//
// Two routers run side by side. Router A keeps the reassembly stage and is
// taken through: a single packet through the empty switch (its latency is
// checked: the last cell of a k-cell packet leaves 2k+1 slots after its last
// word arrived), random uniform traffic in cell mode, the same in packet mode,
// and a hot-spot overload in packet mode that forces whole-packet discards.
// Router B has no reassembly stage, uses the MUCS scheduler and runs packet
// mode only, so its output lines must carry each packet contiguously
// straight from the fabric. Router C receives exactly the traffic of router
// A (same mode changes) but uses the iOCF scheduler; it must deliver every
// admitted packet intact as well.
// A scoreboard checks every delivered packet; the test also requires cells of
// different packets to interleave at a fabric output in cell mode, never in
// packet mode, and held packet-mode matches and input discards to occur.
module tb_iq_router;
  import switch_pkg::*;
  localparam int unsigned N = 4, L = 64, MAXP = 16;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  sched_mode_e mode_a, mode_b;
  logic gen_en, dir_on;
  logic [1:0] hot;
  int unsigned p_start;

  // directed stimulus for router A
  logic [N-1:0] d_valid, d_sop, d_eop;
  logic [$clog2(N)-1:0] d_dest [N];
  logic [CELL_DATA_W-1:0] d_data [N];

  // ---------------- router A ----------------
  logic [N-1:0] ga_valid, ga_sop, ga_eop, a_valid, a_sop, a_eop;
  logic [$clog2(N)-1:0] ga_dest [N], a_dest [N], a_osrc [N];
  logic [CELL_DATA_W-1:0] ga_data [N], a_data [N], a_odata [N];
  logic [N-1:0] a_ovalid, a_osop, a_oeop, a_drop, a_vlost, a_olost, a_odisc, a_held;
  int unsigned a_sent;
  int a_checks, a_fail, a_deliv, a_dropped, a_il, a_miss;

  traffic_gen #(.N(N), .MAX_LEN(MAXP)) u_gen_a (
    .clk, .rst_n, .enable(gen_en), .hot, .p_start,
    .in_valid(ga_valid), .in_sop(ga_sop), .in_eop(ga_eop), .in_dest(ga_dest),
    .in_data(ga_data), .packets_sent(a_sent));

  always_comb begin
    a_valid = dir_on ? d_valid : ga_valid;
    a_sop   = dir_on ? d_sop   : ga_sop;
    a_eop   = dir_on ? d_eop   : ga_eop;
    a_dest  = dir_on ? d_dest  : ga_dest;
    a_data  = dir_on ? d_data  : ga_data;
  end

  iq_router #(.N(N), .L(L), .MAX_PKT(MAXP), .ORM_DEPTH(4 * MAXP), .USE_ORM(1'b1)) dut_a (
    .clk, .rst_n, .mode(mode_a),
    .in_valid(a_valid), .in_sop(a_sop), .in_eop(a_eop), .in_dest(a_dest), .in_data(a_data),
    .out_valid(a_ovalid), .out_sop(a_osop), .out_eop(a_oeop), .out_data(a_odata), .out_src(a_osrc),
    .ism_drop(a_drop), .voq_lost(a_vlost), .orm_lost(a_olost), .orm_discard(a_odisc),
    .held_match(a_held));

  logic [N-1:0] a_adm;
  for (genvar i = 0; i < N; i++) begin : g_adm_a
    assign a_adm[i] = dut_a.seg_valid[i] && dut_a.seg_cell[i].first;
  end

  router_checker #(.N(N)) u_chk_a (
    .clk, .rst_n, .in_valid(a_valid), .in_sop(a_sop), .in_eop(a_eop), .in_dest(a_dest),
    .in_data(a_data), .adm_start(a_adm), .adm_drop(a_drop),
    .out_valid(a_ovalid), .out_sop(a_osop), .out_eop(a_oeop), .out_data(a_odata), .out_src(a_osrc),
    .checks(a_checks), .failures(a_fail), .delivered(a_deliv), .dropped(a_dropped),
    .interleaved(a_il), .missing(a_miss));

  // ---------------- router B: no reassembly, packet mode ----------------
  logic [N-1:0] b_valid, b_sop, b_eop;
  logic [$clog2(N)-1:0] b_dest [N], b_osrc [N];
  logic [CELL_DATA_W-1:0] b_data [N], b_odata [N];
  logic [N-1:0] b_ovalid, b_osop, b_oeop, b_drop, b_vlost, b_olost, b_odisc, b_held;
  int unsigned b_sent;
  int b_checks, b_fail, b_deliv, b_dropped, b_il, b_miss;

  traffic_gen #(.N(N), .MAX_LEN(MAXP)) u_gen_b (
    .clk, .rst_n, .enable(gen_en), .hot, .p_start,
    .in_valid(b_valid), .in_sop(b_sop), .in_eop(b_eop), .in_dest(b_dest),
    .in_data(b_data), .packets_sent(b_sent));

  iq_router #(.N(N), .L(L), .MAX_PKT(MAXP), .USE_ORM(1'b0), .SCHED(1)) dut_b (
    .clk, .rst_n, .mode(mode_b),
    .in_valid(b_valid), .in_sop(b_sop), .in_eop(b_eop), .in_dest(b_dest), .in_data(b_data),
    .out_valid(b_ovalid), .out_sop(b_osop), .out_eop(b_oeop), .out_data(b_odata), .out_src(b_osrc),
    .ism_drop(b_drop), .voq_lost(b_vlost), .orm_lost(b_olost), .orm_discard(b_odisc),
    .held_match(b_held));

  logic [N-1:0] b_adm;
  for (genvar i = 0; i < N; i++) begin : g_adm_b
    assign b_adm[i] = dut_b.seg_valid[i] && dut_b.seg_cell[i].first;
  end

  router_checker #(.N(N)) u_chk_b (
    .clk, .rst_n, .in_valid(b_valid), .in_sop(b_sop), .in_eop(b_eop), .in_dest(b_dest),
    .in_data(b_data), .adm_start(b_adm), .adm_drop(b_drop),
    .out_valid(b_ovalid), .out_sop(b_osop), .out_eop(b_oeop), .out_data(b_odata), .out_src(b_osrc),
    .checks(b_checks), .failures(b_fail), .delivered(b_deliv), .dropped(b_dropped),
    .interleaved(b_il), .missing(b_miss));

  // ---------------- router C: iOCF scheduler, same traffic as A ----------------
  logic [N-1:0] c_ovalid, c_osop, c_oeop, c_drop, c_vlost, c_olost, c_odisc, c_held;
  logic [$clog2(N)-1:0] c_osrc [N];
  logic [CELL_DATA_W-1:0] c_odata [N];
  int c_checks, c_fail, c_deliv, c_dropped, c_il, c_miss;

  iq_router #(.N(N), .L(L), .MAX_PKT(MAXP), .ORM_DEPTH(4 * MAXP), .USE_ORM(1'b1), .SCHED(2)) dut_c (
    .clk, .rst_n, .mode(mode_a),
    .in_valid(a_valid), .in_sop(a_sop), .in_eop(a_eop), .in_dest(a_dest), .in_data(a_data),
    .out_valid(c_ovalid), .out_sop(c_osop), .out_eop(c_oeop), .out_data(c_odata), .out_src(c_osrc),
    .ism_drop(c_drop), .voq_lost(c_vlost), .orm_lost(c_olost), .orm_discard(c_odisc),
    .held_match(c_held));

  logic [N-1:0] c_adm;
  for (genvar i = 0; i < N; i++) begin : g_adm_c
    assign c_adm[i] = dut_c.seg_valid[i] && dut_c.seg_cell[i].first;
  end

  router_checker #(.N(N)) u_chk_c (
    .clk, .rst_n, .in_valid(a_valid), .in_sop(a_sop), .in_eop(a_eop), .in_dest(a_dest),
    .in_data(a_data), .adm_start(c_adm), .adm_drop(c_drop),
    .out_valid(c_ovalid), .out_sop(c_osop), .out_eop(c_oeop), .out_data(c_odata), .out_src(c_osrc),
    .checks(c_checks), .failures(c_fail), .delivered(c_deliv), .dropped(c_dropped),
    .interleaved(c_il), .missing(c_miss));

  // ---------------- event counters ----------------
  int n_held, n_drop, n_il_cell, n_il_pkt, n_loss;
  logic [N-1:0] x_busy;
  logic [$clog2(N)-1:0] x_prev [N];
  always @(posedge clk) begin
    if (!rst_n) begin
      n_held = 0; n_drop = 0; n_il_cell = 0; n_il_pkt = 0; n_loss = 0; x_busy = '0;
    end else begin
      n_held += $countones(a_held) + $countones(b_held);
      n_drop += $countones(a_drop) + $countones(b_drop);
      n_loss += $countones(a_vlost | a_olost | a_odisc | b_vlost);
      for (int j = 0; j < N; j++) begin
        if (dut_a.x_valid[j]) begin
          // a cell of another source arrives while a packet is still open here
          if (x_busy[j] && dut_a.x_src[j] != x_prev[j]) begin
            if (mode_a == PACKET_MODE) n_il_pkt++; else n_il_cell++;
          end
          if (dut_a.x_cell[j].first) begin
            x_busy[j] = !dut_a.x_cell[j].last;
            x_prev[j] = dut_a.x_src[j];
          end else if (dut_a.x_cell[j].last && dut_a.x_src[j] == x_prev[j]) begin
            x_busy[j] = 1'b0;
          end
        end
      end
    end
  end

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("CHECK FAILED: %s", msg);
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks + a_checks + b_checks + c_checks, failures + a_fail + b_fail + c_fail);
    $finish;
  end

  int t_last, t_out;
  initial begin
    mode_a = CELL_MODE; mode_b = PACKET_MODE;
    gen_en = 0; hot = 0; p_start = 0; dir_on = 1;
    d_valid = '0; d_sop = '0; d_eop = '0;
    for (int i = 0; i < N; i++) begin d_dest[i] = '0; d_data[i] = '0; end
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    repeat (2) @(posedge clk);

    // one 5-cell packet, input 2 -> output 1, through the empty switch
    for (int k = 0; k < 5; k++) begin
      d_valid[2] <= 1'b1; d_sop[2] <= (k == 0); d_eop[2] <= (k == 4);
      d_dest[2] <= 2'd1; d_data[2] <= {8'd2, 16'd1, 8'(k)};
      @(posedge clk);
    end
    t_last = $time / 10 - 1;     // slot of the last word
    d_valid[2] <= 1'b0; d_sop[2] <= 1'b0; d_eop[2] <= 1'b0;
    t_out = -1;
    for (int c = 0; c < 40; c++) begin
      @(posedge clk);
      if (a_ovalid[1] && a_oeop[1] && t_out < 0) t_out = $time / 10 - 1;
    end
    check(t_out - t_last == 2 * 5 + 1, $sformatf("5-cell packet latency %0d slots, expected 11", t_out - t_last));
    check(a_deliv == 1, "directed packet delivered");
    dir_on = 0;

    // uniform traffic, load about 0.6, cell mode on A
    p_start = 9830; gen_en = 1;
    repeat (3000) @(posedge clk);
    // switch A to packet mode
    mode_a = PACKET_MODE;
    repeat (3000) @(posedge clk);
    // hot-spot overload: every input always on
    hot = 1; p_start = 65536;
    repeat (2000) @(posedge clk);
    gen_en = 0;
    repeat (3000) @(posedge clk);

    check(u_chk_a.outstanding() == 0, "router A delivered every admitted packet");
    check(u_chk_b.outstanding() == 0, "router B delivered every admitted packet");
    check(a_deliv > 200 && b_deliv > 200, $sformatf("packets delivered A=%0d B=%0d", a_deliv, b_deliv));
    check(u_chk_c.outstanding() == 0, "router C delivered every admitted packet");
    check(c_deliv > 200 && c_miss == 0 && !(|{c_vlost, c_olost, c_odisc}),
          $sformatf("router C (iOCF) delivered %0d", c_deliv));
    check(n_drop > 0, "whole-packet discards at the inputs happened");
    check(n_held > 0, "held packet-mode matches happened");
    check(n_il_cell > 0, "cells of different packets interleaved at an output in cell mode");
    check(n_il_pkt == 0, $sformatf("no interleaving in packet mode (%0d)", n_il_pkt));
    check(n_loss == 0 && a_miss == 0 && b_miss == 0, "no cell lost inside the switch");
    $display("router C delivered %0d dropped %0d", c_deliv, c_dropped);
    $display("delivered A=%0d B=%0d dropped A=%0d B=%0d held=%0d il_cell=%0d",
             a_deliv, b_deliv, a_dropped, b_dropped, n_held, n_il_cell);
    $display("TB_RESULT checks=%0d failures=%0d", checks + a_checks + b_checks + c_checks, failures + a_fail + b_fail + c_fail);
    $finish;
  end
endmodule
