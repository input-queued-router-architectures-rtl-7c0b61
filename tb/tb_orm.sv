// tb_orm: output reassembly module with 4 sources (rings of 8 cells in A, 16 in B).
//
// Four sources send packets of 1..8 cells (rings of 8 cells in A) whose cells are interleaved at
// random on the module input; instance A takes 1 cell per slot, instance B up
// to 2 (possibly both from the same source). Every packet must come out
// whole, contiguous, with correct framing and source, in the order in which
// the packets were completed. Bursts overflow the rings: the damaged packets
// must be discarded, and a packet may be missing only if a loss was
// reported. A packet whose tail never arrives (the next packet of its source
// starts instead) must be discarded too. The latency of a packet through the
// idle module is checked: its first cell leaves in the slot after its last
// cell arrived.
module tb_orm;
  import switch_pkg::*;
  localparam int unsigned N = 4, D = 16;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, slot = 0;

  task automatic check(bit c, string m);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("CHECK FAILED slot %0d: %s", slot, m); end
  endtask

  typedef struct { int src; int id; int len; } pkt_t;

  logic [1:0] iv [2];
  cell_t ic [2][2];
  logic [1:0] is [2][2];
  logic ov [2], osop [2], oeop [2], lost [2], disc [2];
  logic [CELL_DATA_W-1:0] od [2];
  logic [1:0] os [2];

  orm #(.N(N), .DEPTH(D / 2), .W_IN(1)) dut_a (
    .clk, .rst_n, .in_valid(iv[0][0:0]), .in_cell(ic[0][0:0]), .in_src(is[0][0:0]),
    .out_valid(ov[0]), .out_sop(osop[0]), .out_eop(oeop[0]), .out_data(od[0]), .out_src(os[0]),
    .cell_lost(lost[0]), .pkt_discard(disc[0]));
  orm #(.N(N), .DEPTH(D), .W_IN(2)) dut_b (
    .clk, .rst_n, .in_valid(iv[1]), .in_cell(ic[1]), .in_src(is[1]),
    .out_valid(ov[1]), .out_sop(osop[1]), .out_eop(oeop[1]), .out_data(od[1]), .out_src(os[1]),
    .cell_lost(lost[1]), .pkt_discard(disc[1]));

  pkt_t done_q [2][$];
  int   pos [2], nloss [2], ndisc [2], nskip [2], ndeliv [2];
  pkt_t cur [2];

  always @(posedge clk) if (rst_n) begin
    slot++;
    for (int u = 0; u < 2; u++) begin
      if (lost[u]) nloss[u]++;
      if (disc[u]) ndisc[u]++;
      if (ov[u]) begin
        if (osop[u]) begin
          check(pos[u] < 0, "new packet only after the previous one");
          while (done_q[u].size() > 0 &&
                 !(done_q[u][0].src == int'(od[u][31:24]) && done_q[u][0].id == int'(od[u][23:8]))) begin
            void'(done_q[u].pop_front());
            nskip[u]++;
          end
          check(done_q[u].size() > 0, "packet was completed before");
          cur[u] = done_q[u].pop_front();
          pos[u] = 0;
        end
        check(pos[u] >= 0, "cell inside a packet");
        check(od[u] == {8'(cur[u].src), 16'(cur[u].id), 8'(pos[u])} && os[u] == 2'(cur[u].src), "cell content");
        check(oeop[u] == (pos[u] == cur[u].len - 1), "end of packet flag");
        pos[u]++;
        if (oeop[u]) begin pos[u] = -1; ndeliv[u]++; end
      end else begin
        check(pos[u] < 0, "packet sent contiguously");
      end
    end
  end

  // per-instance, per-source generators
  int rem [2][N], idx [2][N], ids [2][N], plen [2][N];

  function automatic cell_t next_cell(int u, int s, bit no_tail);
    cell_t c;
    if (rem[u][s] == 0) begin
      ids[u][s]++;
      plen[u][s] = 1 + $urandom % 8;
      rem[u][s] = plen[u][s];
      idx[u][s] = 0;
    end
    c.first = (idx[u][s] == 0);
    c.last  = (rem[u][s] == 1) && !no_tail;
    c.data  = {8'(s), 16'(ids[u][s]), 8'(idx[u][s])};
    idx[u][s]++;
    rem[u][s]--;
    if (no_tail && rem[u][s] == 0) begin
      // the tail was lost upstream: this packet never completes
    end
    return c;
  endfunction

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int u = 0; u < 2; u++) begin
      pos[u] = -1; nloss[u] = 0; ndisc[u] = 0; nskip[u] = 0; ndeliv[u] = 0;
      iv[u] = '0;
      for (int e = 0; e < 2; e++) begin ic[u][e] = '0; is[u][e] = '0; end
    end
    for (int u = 0; u < 2; u++) for (int s = 0; s < N; s++) begin rem[u][s] = 0; idx[u][s] = 0; ids[u][s] = 0; plen[u][s] = 0; end
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk); #1;

    // latency: one 3-cell packet from source 2 into both idle modules
    for (int k = 0; k < 3; k++) begin
      for (int u = 0; u < 2; u++) begin
        iv[u] = 2'b01; is[u][0] = 2'd2;
        ic[u][0] = '{first: (k == 0), last: (k == 2), data: {8'd2, 16'd0, 8'(k)}};
        if (k == 2) done_q[u].push_back('{2, 0, 3});
      end
      @(posedge clk); #1;
    end
    for (int u = 0; u < 2; u++) iv[u] = '0;
    check(ov[0] && osop[0] && ov[1] && osop[1], "first cell leaves in the slot after the last arrived");
    repeat (5) @(posedge clk); #1;

    // random interleaving; phase 2 sends faster than the line to overflow
    for (int t = 0; t < 4000; t++) begin
      int ncell;
      bit burst;
      burst = (t >= 1500 && t < 2500);
      for (int u = 0; u < 2; u++) begin
        iv[u] = '0;
        ncell = (u == 0) ? 1 : 2;
        for (int e = 0; e < ncell; e++) begin
          if (($urandom % 100) < (burst ? 100 : 35)) begin
            int s;
            cell_t c;
            s = $urandom % N;
            c = next_cell(u, s, 1'b0);
            iv[u][e] = 1'b1; ic[u][e] = c; is[u][e] = 2'(s);
            if (c.last) done_q[u].push_back('{s, int'(c.data[23:8]), int'(c.data[7:0]) + 1});
          end
        end
      end
      @(posedge clk); #1;
    end
    // a packet whose tail never comes: source 1 sends 2 cells, then a new packet
    for (int u = 0; u < 2; u++) iv[u] = '0;
    repeat (200) @(posedge clk); #1;
    begin
      int d0;
      d0 = ndisc[0];
      for (int k = 0; k < 3; k++) begin
        for (int u = 0; u < 2; u++) begin
          iv[u] = 2'b01; is[u][0] = 2'd1;
          ic[u][0] = '{first: (k != 1), last: (k == 2), data: {8'd1, 16'd60000 + 16'(k / 2), 8'(k == 2 ? 0 : k)}};
        end
        @(posedge clk); #1;
      end
      for (int u = 0; u < 2; u++) begin
        iv[u] = '0;
        done_q[u].push_back('{1, 60001, 1});
      end
      repeat (50) @(posedge clk); #1;
      check(ndisc[0] >= d0 + 1, "packet without its tail discarded");
    end
    for (int u = 0; u < 2; u++) begin
      check(done_q[u].size() == 0, "every completed packet delivered or skipped");
      check(nloss[u] > 0 && nskip[u] > 0, "ring overflow happened and damaged packets were dropped");
      check(nskip[u] <= nloss[u], "a packet is missing only after a reported loss");
      check(ndeliv[u] > 300, "many packets delivered");
    end
    $display("A: deliv %0d loss %0d skip %0d disc %0d | B: deliv %0d loss %0d skip %0d disc %0d",
             ndeliv[0], nloss[0], nskip[0], ndisc[0], ndeliv[1], nloss[1], nskip[1], ndisc[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
