// iq_router: input-queued packet router built around an N x N cell switch.
//
// Each input has an input segmentation module (ism) that receives a packet at
// line speed, stores it whole and then feeds its cells, one per slot, into
// the virtual output queue Q_ij of its destination (voq_buffer); a packet that
// does not fit entirely in that queue when its first cell gets there is
// discarded whole. In every slot the iSLIP scheduler (islip_sched) computes a
// conflict-free match from the non-empty queues, the matched head cells cross
// the memoryless fabric (crossbar), and at each output an output reassembly
// module with its packet FIFO (orm) rebuilds packets and sends them on the
// output line one cell per slot.
//
// mode selects cell-mode or packet-mode scheduling. In packet mode the cells
// of a packet reach their output in consecutive slots, never interleaved with
// another packet, so the reassembly stage is not needed: with USE_ORM = 0 the
// fabric outputs drive the output lines directly (the simplified router; only
// meaningful in packet mode). With USE_ORM = 1 the reassembly stage is kept,
// as in the general architecture.
//
// Interface: per input, in_valid/in_sop/in_eop/in_dest/in_data carry one word
// of a packet per slot; per output, out_valid/out_sop/out_eop/out_data/out_src
// carry one cell per slot. Event pulses report packets discarded at the inputs
// (ism_drop), cells lost in full queues (voq_lost, orm_lost), packets dropped
// by the reassembly stage (orm_discard) and held packet-mode matches
// (held_match).
// Timing: one clock cycle is one slot. A packet whose last word enters input i
// in slot t has its first cell in the queue at the end of slot t+1 and can
// cross the fabric in slot t+2.
// SCHED selects the matching scheduler: 0 (default) iSLIP, the one
// recommended for its simplicity, 1 the weighted MUCS scheduler
// (mucs_sched) or 2 the iOCF scheduler (iocf_sched), alternatives it was
// compared with. iOCF needs the age of every head cell: a second voq_buffer
// per input, written and read in step with the first, stores the slot number
// at which each cell entered, and a free-running slot counter gives the age.
// Ports left open on purpose: the ism's too_long (such packets are also
// reported on ism_drop), the main buffer's all-heads output, and the unused
// outputs of the stamp buffer; with iSLIP or MUCS the slot counter and ages
// are tied to zero and unused.
// The structure follows the router architecture; L = 30000 cells per queue
// and N = 16 are the evaluated sizes.
module iq_router
  import switch_pkg::*;
#(
  parameter int unsigned N         = 16,
  parameter int unsigned L         = 30000,
  parameter int unsigned ITER      = 4,
  parameter int unsigned MAX_PKT   = MAX_PKT_CELLS,
  parameter int unsigned ORM_DEPTH = 2 * MAX_PKT_CELLS,
  parameter bit          USE_ORM   = 1'b1,
  parameter int unsigned SCHED     = 0      // 0: iSLIP, 1: MUCS, 2: iOCF
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
  output logic [N-1:0]           voq_lost,
  output logic [N-1:0]           orm_lost,
  output logic [N-1:0]           orm_discard,
  output logic [N-1:0]           held_match
);
  localparam int unsigned DW = $clog2(N);
  localparam int unsigned CW = $clog2(L + 1);

  logic [N-1:0]  seg_valid;
  cell_t         seg_cell [N];
  logic [DW-1:0] seg_dest [N];
  logic [CW-1:0] qlen [N][N];
  logic [N-1:0]  req  [N];
  cell_t         head_cell [N];
  logic [N-1:0]  head_last;
  logic [N-1:0]  m_valid;
  logic [DW-1:0] m_out [N];
  logic [N-1:0]  x_valid;
  cell_t         x_cell [N];
  logic [DW-1:0] x_src [N];
  logic [CELL_DATA_W-1:0] now;          // slot counter (iOCF only)
  logic [CELL_DATA_W-1:0] age [N][N];   // head-cell ages (iOCF only)

  if (SCHED == 2) begin : g_now
    always_ff @(posedge clk) begin
      if (!rst_n) now <= '0;
      else        now <= now + 1'b1;
    end
  end else begin : g_no_now
    assign now = '0;
    for (genvar i = 0; i < N; i++) begin : g_a
      for (genvar j = 0; j < N; j++) begin : g_b
        assign age[i][j] = '0;
      end
    end
  end

  for (genvar i = 0; i < N; i++) begin : g_in
    logic [31:0] free;
    logic [0:0]  sv;
    cell_t [0:0] sc;
    assign free = 32'(L) - 32'(qlen[i][seg_dest[i]]);

    ism #(.N(N), .MAX_PKT(MAX_PKT), .ILS(1)) u_ism (
      .clk, .rst_n,
      .in_valid (in_valid[i]),
      .in_sop   (in_sop[i]),
      .in_eop   (in_eop[i]),
      .in_dest  (in_dest[i]),
      .in_data  (in_data[i]),
      .free_cells (free),
      .out_valid (sv),
      .out_cell  (sc),
      .out_dest  (seg_dest[i]),
      .drop_pkt  (ism_drop[i]),
      .too_long  ()
    );
    assign seg_valid[i] = sv[0];
    assign seg_cell[i]  = sc[0];

    voq_buffer #(.N(N), .L(L)) u_voq (
      .clk, .rst_n,
      .wr_valid (seg_valid[i]),
      .wr_dest  (seg_dest[i]),
      .wr_cell  (seg_cell[i]),
      .wr_lost  (voq_lost[i]),
      .rd_en    (m_valid[i]),
      .rd_sel   (m_out[i]),
      .rd_cell  (head_cell[i]),
      .heads    (),
      .qlen     (qlen[i])
    );

    if (SCHED == 2) begin : g_stamp
      // a twin buffer holding the arrival slot of every queued cell, so the
      // age of each head cell is known
      cell_t st_in;
      cell_t st_heads [N];
      assign st_in = '{first: 1'b0, last: 1'b0, data: now};
      voq_buffer #(.N(N), .L(L)) u_stamps (
        .clk, .rst_n,
        .wr_valid (seg_valid[i]),
        .wr_dest  (seg_dest[i]),
        .wr_cell  (st_in),
        .wr_lost  (),
        .rd_en    (m_valid[i]),
        .rd_sel   (m_out[i]),
        .rd_cell  (),
        .heads    (st_heads),
        .qlen     ()
      );
      for (genvar j = 0; j < N; j++) begin : g_age
        assign age[i][j] = now - st_heads[j].data;
      end
    end

    for (genvar j = 0; j < N; j++) begin : g_req
      assign req[i][j] = (qlen[i][j] != '0);
    end
    assign head_last[i] = head_cell[i].last;
  end

  if (SCHED == 1) begin : g_mucs
    mucs_sched #(.N(N), .QW(CW)) u_sched (
      .clk, .rst_n,
      .mode,
      .req,
      .qlen,
      .xfer_last  (head_last),
      .match_valid(m_valid),
      .match_out  (m_out),
      .match_held (held_match)
    );
  end else if (SCHED == 2) begin : g_iocf
    iocf_sched #(.N(N), .ITER(ITER), .AW(CELL_DATA_W)) u_sched (
      .clk, .rst_n,
      .mode,
      .req,
      .age,
      .xfer_last  (head_last),
      .match_valid(m_valid),
      .match_out  (m_out),
      .match_held (held_match)
    );
  end else begin : g_islip
    islip_sched #(.N(N), .ITER(ITER)) u_sched (
      .clk, .rst_n,
      .mode,
      .req,
      .xfer_last  (head_last),
      .match_valid(m_valid),
      .match_out  (m_out),
      .match_held (held_match)
    );
  end

  crossbar #(.N(N)) u_xbar (
    .in_en    (m_valid),
    .in_dest  (m_out),
    .in_cell  (head_cell),
    .out_valid(x_valid),
    .out_cell (x_cell),
    .out_src  (x_src)
  );

  for (genvar j = 0; j < N; j++) begin : g_out
    if (USE_ORM) begin : g_orm
      logic [0:0]    ov;
      cell_t         oc [1];
      logic [DW-1:0] os [1];
      assign ov[0] = x_valid[j];
      assign oc[0] = x_cell[j];
      assign os[0] = x_src[j];
      orm #(.N(N), .DEPTH(ORM_DEPTH), .W_IN(1)) u_orm (
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
    end else begin : g_direct
      assign out_valid[j]   = x_valid[j];
      assign out_sop[j]     = x_valid[j] && x_cell[j].first;
      assign out_eop[j]     = x_valid[j] && x_cell[j].last;
      assign out_data[j]    = x_cell[j].data;
      assign out_src[j]     = x_src[j];
      assign orm_lost[j]    = 1'b0;
      assign orm_discard[j] = 1'b0;
    end
  end

endmodule
