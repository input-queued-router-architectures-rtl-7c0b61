// cioq_router: combined input/output-queued packet router with an internal
// speed-up of 2 and FIFO-2 scheduling.
//
// Each input has an input segmentation module (ism) that stores a whole
// packet and then moves its cells into the input's single FIFO queue
// (cell_fifo) at SPEEDUP_IP_IN cells per slot; a packet that does not fit
// whole in that queue is discarded. The fabric is used twice per slot: the
// FIFO-2 scheduler (fifo2_sched) makes two conflict-free selections, each
// carried by one fabric pass (crossbar), so up to two cells leave each input
// queue and up to two cells enter each output queue (another cell_fifo) in a
// slot. Each output queue feeds SPEEDUP_IP_OUT cells per slot to an output
// reassembly module with packet FIFO (orm), which sends whole packets on the
// output line one cell per slot.
//
// The evaluated setups are FF-<in><2><out>: SPEEDUP_IP_IN, internal speed-up
// 2, SPEEDUP_IP_OUT, with the scheduler in cell mode (FF) or packet mode
// (FF-PM). The defaults give FF-221 / FF-PM221 (chosen with mode). When
// SPEEDUP_IP_IN is 2 the packet-mode scheduler reserves an output for a
// packet in both executions of a slot, so packets never interleave in output
// queues; with SPEEDUP_IP_IN = 1 only in one execution.
//
// Interface: as iq_router. Event pulses: ism_drop (packet discarded at an
// input), in_lost / out_lost (cell lost in a full queue), orm_lost /
// orm_discard (reassembly losses), deferred[e] (execution e deferred an
// input because its output was taken), pass2[j] (output j received two
// cells in one slot).
// Timing: one clock cycle is one slot; a cell written into an input queue in
// slot t can cross the fabric in slot t+1 and reach the reassembly stage in
// slot t+2.
// Queue capacities are unlimited in the evaluated setups; this design gives
// every input and output queue N*L cells, the total buffer of one input of
// the input-queued router.
module cioq_router
  import switch_pkg::*;
#(
  parameter int unsigned N              = 16,
  parameter int unsigned QDEPTH         = 16 * 30000,
  parameter int unsigned SPEEDUP_IP_IN  = 2,
  parameter int unsigned SPEEDUP_IP_OUT = 1,
  parameter int unsigned MAX_PKT        = MAX_PKT_CELLS,
  parameter int unsigned ORM_DEPTH      = 2 * MAX_PKT_CELLS
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  sched_mode_e            mode,
  input  logic [N-1:0]           in_valid,
  input  logic [N-1:0]           in_sop,
  input  logic [N-1:0]           in_eop,
  input  logic [$clog2(N)-1:0]   in_dest [N],
  input  logic [CELL_DATA_W-1:0] in_data [N],
  output logic [N-1:0]           out_valid,
  output logic [N-1:0]           out_sop,
  output logic [N-1:0]           out_eop,
  output logic [CELL_DATA_W-1:0] out_data [N],
  output logic [$clog2(N)-1:0]   out_src [N],
  output logic [N-1:0]           ism_drop,
  output logic [N-1:0]           in_lost,
  output logic [N-1:0]           out_lost,
  output logic [N-1:0]           orm_lost,
  output logic [N-1:0]           orm_discard,
  output logic [1:0]             deferred,
  output logic [N-1:0]           pass2
);
  localparam int unsigned DW   = $clog2(N);
  localparam int unsigned SIN  = SPEEDUP_IP_IN;
  localparam int unsigned SOUT = SPEEDUP_IP_OUT;
  localparam int unsigned QCW  = $clog2(QDEPTH + 1);

  logic [1:0]    hv    [N];
  cell_t         hc    [N][2];
  logic [DW-1:0] hd    [N][2];
  logic [1:0]    hl    [N];
  logic [N-1:0]  g     [2];
  logic [DW-1:0] gd    [2][N];
  logic          gi    [2][N];
  logic [1:0]    sent  [N];
  logic [N-1:0]  xv    [2];
  cell_t         xc    [2][N];
  logic [DW-1:0] xs    [2][N];
  cell_t         pc    [2][N];

  for (genvar i = 0; i < N; i++) begin : g_in
    logic [SIN-1:0]  sv;
    cell_t [SIN-1:0] sc;
    cell_t           wc [SIN];
    logic [DW-1:0]   wt [SIN];
    logic [DW-1:0]   sdest;
    logic [QCW-1:0]  lvl;
    logic [31:0]     free;
    assign free = 32'(QDEPTH) - 32'(lvl);

    ism #(.N(N), .MAX_PKT(MAX_PKT), .ILS(SIN)) u_ism (
      .clk, .rst_n,
      .in_valid (in_valid[i]),
      .in_sop   (in_sop[i]),
      .in_eop   (in_eop[i]),
      .in_dest  (in_dest[i]),
      .in_data  (in_data[i]),
      .free_cells (free),
      .out_valid (sv),
      .out_cell  (sc),
      .out_dest  (sdest),
      .drop_pkt  (ism_drop[i]),
      .too_long  ()
    );
    for (genvar e = 0; e < SIN; e++) begin : g_w
      assign wc[e] = sc[e];
      assign wt[e] = sdest;
    end

    cell_fifo #(.DEPTH(QDEPTH), .TAG_W(DW), .W_WR(SIN), .W_RD(2)) u_inq (
      .clk, .rst_n,
      .wr_valid  (sv),
      .wr_cell   (wc),
      .wr_tag    (wt),
      .wr_lost   (in_lost[i]),
      .rd_cnt    (sent[i]),
      .head_valid(hv[i]),
      .head_cell (hc[i]),
      .head_tag  (hd[i]),
      .level     (lvl)
    );
    assign hl[i] = {hc[i][1].last, hc[i][0].last};
    for (genvar e = 0; e < 2; e++) begin : g_p
      assign pc[e][i] = hc[i][gi[e][i]];
    end
  end

  fifo2_sched #(.N(N), .EXCL(SIN >= 2)) u_sched (
    .clk, .rst_n,
    .mode,
    .head_valid (hv),
    .head_dest  (hd),
    .head_last  (hl),
    .grant      (g),
    .grant_dest (gd),
    .grant_idx  (gi),
    .sent       (sent),
    .deferred   (deferred)
  );

  for (genvar e = 0; e < 2; e++) begin : g_pass
    crossbar #(.N(N)) u_xbar (
      .in_en    (g[e]),
      .in_dest  (gd[e]),
      .in_cell  (pc[e]),
      .out_valid(xv[e]),
      .out_cell (xc[e]),
      .out_src  (xs[e])
    );
  end

  for (genvar j = 0; j < N; j++) begin : g_out
    logic [1:0]            wv;
    cell_t                 wc [2];
    logic [DW-1:0]         wt [2];
    logic [SOUT-1:0]       ov;
    cell_t                 oc [SOUT];
    logic [DW-1:0]         os [SOUT];
    logic [QCW-1:0]        lvl;
    logic [$clog2(SOUT+1)-1:0] rc;
    logic [1:0]            wacc;
    logic [N-1:0]          poison;   // poison[s]: rest of the packet from s is dropped
    logic [N-1:0]          poison_n;
    logic [1:0]            qfree;
    logic                  qlost;
    // Output-queue loss: once a cell of a packet is lost, the rest of that
    // packet is dropped before the queue, so that the reassembly stage sees
    // a packet without its tail and discards it.
    always_comb begin
      poison_n = poison;
      wacc     = '0;
      qlost    = 1'b0;
      qfree    = (lvl >= QCW'(QDEPTH)) ? 2'd0 :
                 (lvl == QCW'(QDEPTH - 1)) ? 2'd1 : 2'd2;
      for (int e = 0; e < 2; e++) begin
        if (xv[e][j]) begin
          if (xc[e][j].first) poison_n[xs[e][j]] = 1'b0;
          if (!poison_n[xs[e][j]] && qfree != 2'd0) begin
            wacc[e] = 1'b1;
            qfree   = qfree - 2'd1;
          end else begin
            qlost = 1'b1;
            if (!xc[e][j].last) poison_n[xs[e][j]] = 1'b1;
          end
        end
      end
    end
    always_ff @(posedge clk) begin
      if (!rst_n) poison <= '0;
      else        poison <= poison_n;
    end
    assign out_lost[j] = qlost;
    assign wv    = wacc;
    assign wc[0] = xc[0][j];
    assign wc[1] = xc[1][j];
    assign wt[0] = xs[0][j];
    assign wt[1] = xs[1][j];
    assign pass2[j] = &wv;
    assign rc = (lvl >= QCW'(SOUT)) ? ($clog2(SOUT+1))'(SOUT) : ($clog2(SOUT+1))'(lvl);

    cell_fifo #(.DEPTH(QDEPTH), .TAG_W(DW), .W_WR(2), .W_RD(SOUT)) u_outq (
      .clk, .rst_n,
      .wr_valid  (wv),
      .wr_cell   (wc),
      .wr_tag    (wt),
      .wr_lost   (),
      .rd_cnt    (rc),
      .head_valid(ov),
      .head_cell (oc),
      .head_tag  (os),
      .level     (lvl)
    );

    orm #(.N(N), .DEPTH(ORM_DEPTH), .W_IN(SOUT)) u_orm (
      .clk, .rst_n,
      .in_valid   (ov),
      .in_cell    (oc),
      .in_src     (os),
      .out_valid  (out_valid[j]),
      .out_sop    (out_sop[j]),
      .out_eop    (out_eop[j]),
      .out_data   (out_data[j]),
      .out_src    (out_src[j]),
      .cell_lost  (orm_lost[j]),
      .pkt_discard(orm_discard[j])
    );
  end

endmodule
