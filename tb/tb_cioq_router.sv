// tb_cioq_router: end-to-end test of the CIOQ router (FIFO-2, speed-up 2) at
// 4 ports, in three setups side by side:
//   A: SPEEDUP-IP-IN 2, SPEEDUP-IP-OUT 1 (FF-221, then FF-PM221)
//   B: SPEEDUP-IP-IN 1, SPEEDUP-IP-OUT 1 (FF-121, then FF-PM121)
//   C: SPEEDUP-IP-IN 2, SPEEDUP-IP-OUT 2 (FF-PM222)
// Each is fed random packets, first uniform at load about 0.6, then a
// hot-spot overload with every input always on, and a scoreboard checks every
// delivered packet. The test also requires: outputs receiving two cells in one
// slot, deferred transfers in both executions of FIFO-2, whole-packet
// discards at the inputs, and, in setup A, no interleaving of packets at the
// output queues once packet mode is on, and cells lost in full output queues
// with the broken packets discarded by the reassembly stage (a lost packet
// is accepted only where a cell loss was reported).
module tb_cioq_router;
  import switch_pkg::*;
  localparam int unsigned N = 4, QD = 48, MAXP = 16;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  sched_mode_e mode;
  logic gen_en;
  logic [1:0] hot;
  int unsigned p_start;

  int ck [3], fl [3], dl [3], dr [3], il [3], ms [3];
  int n_pass2, n_def0, n_def1, n_drop, n_loss, n_il_pm, n_disc;
  int n_loss_s [3];
  int unsigned sent [3];

  for (genvar s = 0; s < 3; s++) begin : g_set
    localparam int unsigned SIN  = (s == 1) ? 1 : 2;
    localparam int unsigned SOUT = (s == 2) ? 2 : 1;
    logic [N-1:0] iv, isp, iep, ov, osp, oep, drop, ilost, olost, rlost, rdisc, p2;
    logic [$clog2(N)-1:0] idst [N], osrc [N];
    logic [CELL_DATA_W-1:0] idat [N], odat [N];
    logic [1:0] dfr;
    logic [N-1:0] adm;

    traffic_gen #(.N(N), .MAX_LEN(MAXP)) u_gen (
      .clk, .rst_n, .enable(gen_en), .hot, .p_start,
      .in_valid(iv), .in_sop(isp), .in_eop(iep), .in_dest(idst), .in_data(idat),
      .packets_sent(sent[s]));

    cioq_router #(.N(N), .QDEPTH(QD), .SPEEDUP_IP_IN(SIN), .SPEEDUP_IP_OUT(SOUT),
                  .MAX_PKT(MAXP), .ORM_DEPTH(8 * MAXP)) dut (
      .clk, .rst_n, .mode,
      .in_valid(iv), .in_sop(isp), .in_eop(iep), .in_dest(idst), .in_data(idat),
      .out_valid(ov), .out_sop(osp), .out_eop(oep), .out_data(odat), .out_src(osrc),
      .ism_drop(drop), .in_lost(ilost), .out_lost(olost), .orm_lost(rlost),
      .orm_discard(rdisc), .deferred(dfr), .pass2(p2));

    for (genvar i = 0; i < N; i++) begin : g_adm
      assign adm[i] = dut.g_in[i].sv[0] && dut.g_in[i].sc[0].first;
    end

    router_checker #(.N(N)) u_chk (
      .clk, .rst_n, .in_valid(iv), .in_sop(isp), .in_eop(iep), .in_dest(idst),
      .in_data(idat), .adm_start(adm), .adm_drop(drop),
      .out_valid(ov), .out_sop(osp), .out_eop(oep), .out_data(odat), .out_src(osrc),
      .checks(ck[s]), .failures(fl[s]), .delivered(dl[s]), .dropped(dr[s]), .interleaved(il[s]), .missing(ms[s]));

    // packet interleaving at the output-queue inputs (setup A, packet mode)
    logic [N-1:0] busy;
    logic [$clog2(N)-1:0] owner [N];
    always @(posedge clk) begin
      if (!rst_n) begin
        busy = '0;
      end else begin
        n_pass2 += $countones(p2);
        n_drop  += $countones(drop);
        n_loss  += $countones(ilost | olost | rlost);
        n_loss_s[s] += $countones(ilost | olost | rlost);
        n_disc  += $countones(rdisc);
        if (dfr[0]) n_def0++;
        if (dfr[1]) n_def1++;
        for (int j = 0; j < N; j++) begin
          for (int e = 0; e < 2; e++) begin
            if (dut.xv[e][j]) begin
              if (s == 0 && mode == PACKET_MODE && busy[j] && dut.xs[e][j] != owner[j]) n_il_pm++;
              if (dut.xc[e][j].first) owner[j] = dut.xs[e][j];
              busy[j] = !dut.xc[e][j].last;
            end
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

  function automatic int tot_checks();
    return checks + ck[0] + ck[1] + ck[2];
  endfunction
  function automatic int tot_fail();
    return failures + fl[0] + fl[1] + fl[2];
  endfunction

  initial begin
    #4000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", tot_checks(), tot_fail());
    $finish;
  end

  initial begin
    n_pass2 = 0; n_def0 = 0; n_def1 = 0; n_drop = 0; n_loss = 0; n_il_pm = 0; n_disc = 0;
    n_loss_s = '{0, 0, 0};
    mode = CELL_MODE; gen_en = 0; hot = 0; p_start = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    repeat (2) @(posedge clk);

    p_start = 9830; gen_en = 1;
    repeat (3000) @(posedge clk);
    gen_en = 0;
    repeat (1500) @(posedge clk);
    mode = PACKET_MODE;          // switched while the switch is empty
    gen_en = 1;
    repeat (3000) @(posedge clk);
    hot = 1; p_start = 65536;
    repeat (2000) @(posedge clk);
    gen_en = 0;
    repeat (6000) @(posedge clk);

    for (int s = 0; s < 3; s++) begin
      check(dl[s] > 200, $sformatf("setup %0d delivered %0d packets", s, dl[s]));
    end
    // every admitted packet was delivered, or lost after a cell loss
    check(g_set[0].u_chk.outstanding() + ms[0] <= n_loss_s[0], "setup A lost no packet without a cell loss");
    check(g_set[1].u_chk.outstanding() + ms[1] <= n_loss_s[1], "setup B lost no packet without a cell loss");
    check(g_set[2].u_chk.outstanding() + ms[2] <= n_loss_s[2], "setup C lost no packet without a cell loss");
    check(n_pass2 > 0, "two cells reached one output in a slot");
    check(n_def0 > 0 && n_def1 > 0, "both FIFO-2 executions deferred an input");
    check(n_drop > 0, "whole-packet discards at the inputs happened");
    check(n_il_pm == 0, $sformatf("no packet interleaving in FF-PM221 (%0d)", n_il_pm));
    check(n_loss > 0 && n_disc > 0, "output-queue losses happened and the broken packets were discarded");
    $display("loss=%0d disc=%0d missing %0d %0d %0d", n_loss, n_disc, ms[0], ms[1], ms[2]);
    $display("delivered %0d %0d %0d dropped %0d %0d %0d pass2=%0d def=%0d/%0d",
             dl[0], dl[1], dl[2], dr[0], dr[1], dr[2], n_pass2, n_def0, n_def1);
    $display("TB_RESULT checks=%0d failures=%0d", tot_checks(), tot_fail());
    $finish;
  end
endmodule
