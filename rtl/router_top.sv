// router_top: the two packet-router designs side by side.
//
// iq_* ports belong to the input-queued router (virtual output queues,
// iSLIP scheduling in cell or packet mode, reassembly at the outputs);
// cioq_* ports belong to the combined input/output-queued router (one FIFO
// per input and per output, internal speed-up 2, FIFO-2 scheduling). The two
// share only the clock and reset; each has its own line interfaces, mode
// input and event outputs, with the meaning given in iq_router and
// cioq_router. The output port of every packet is supplied with its first
// word (in_dest), standing in for the routing look-up, which is outside this
// design. One clock cycle is one slot. IQ_SCHED chooses the scheduler of the
// input-queued router: iSLIP (0, the default), weighted MUCS (1) or iOCF (2).
module router_top
  import switch_pkg::*;
#(
  parameter int unsigned N              = 16,
  parameter int unsigned L              = 30000,
  parameter int unsigned ITER           = 4,
  parameter bit          USE_ORM        = 1'b1,
  parameter int unsigned SPEEDUP_IP_IN  = 2,
  parameter int unsigned SPEEDUP_IP_OUT = 1,
  parameter int unsigned IQ_SCHED       = 0   // 0: iSLIP, 1: MUCS, 2: iOCF
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // input-queued router
  input  sched_mode_e            iq_mode,
  input  logic [N-1:0]           iq_in_valid,
  input  logic [N-1:0]           iq_in_sop,
  input  logic [N-1:0]           iq_in_eop,
  input  logic [$clog2(N)-1:0]   iq_in_dest [N],
  input  logic [CELL_DATA_W-1:0] iq_in_data [N],
  output logic [N-1:0]           iq_out_valid,
  output logic [N-1:0]           iq_out_sop,
  output logic [N-1:0]           iq_out_eop,
  output logic [CELL_DATA_W-1:0] iq_out_data [N],
  output logic [$clog2(N)-1:0]   iq_out_src [N],
  output logic [N-1:0]           iq_ism_drop,
  output logic [N-1:0]           iq_voq_lost,
  output logic [N-1:0]           iq_orm_lost,
  output logic [N-1:0]           iq_orm_discard,
  output logic [N-1:0]           iq_held_match,
  // combined input/output-queued router
  input  sched_mode_e            cioq_mode,
  input  logic [N-1:0]           cioq_in_valid,
  input  logic [N-1:0]           cioq_in_sop,
  input  logic [N-1:0]           cioq_in_eop,
  input  logic [$clog2(N)-1:0]   cioq_in_dest [N],
  input  logic [CELL_DATA_W-1:0] cioq_in_data [N],
  output logic [N-1:0]           cioq_out_valid,
  output logic [N-1:0]           cioq_out_sop,
  output logic [N-1:0]           cioq_out_eop,
  output logic [CELL_DATA_W-1:0] cioq_out_data [N],
  output logic [$clog2(N)-1:0]   cioq_out_src [N],
  output logic [N-1:0]           cioq_ism_drop,
  output logic [N-1:0]           cioq_in_lost,
  output logic [N-1:0]           cioq_out_lost,
  output logic [N-1:0]           cioq_orm_lost,
  output logic [N-1:0]           cioq_orm_discard,
  output logic [1:0]             cioq_deferred,
  output logic [N-1:0]           cioq_pass2
);

  iq_router #(.N(N), .L(L), .ITER(ITER), .USE_ORM(USE_ORM), .SCHED(IQ_SCHED)) u_iq (
    .clk, .rst_n,
    .mode       (iq_mode),
    .in_valid   (iq_in_valid),
    .in_sop     (iq_in_sop),
    .in_eop     (iq_in_eop),
    .in_dest    (iq_in_dest),
    .in_data    (iq_in_data),
    .out_valid  (iq_out_valid),
    .out_sop    (iq_out_sop),
    .out_eop    (iq_out_eop),
    .out_data   (iq_out_data),
    .out_src    (iq_out_src),
    .ism_drop   (iq_ism_drop),
    .voq_lost   (iq_voq_lost),
    .orm_lost   (iq_orm_lost),
    .orm_discard(iq_orm_discard),
    .held_match (iq_held_match)
  );

  cioq_router #(.N(N), .QDEPTH(N * L), .SPEEDUP_IP_IN(SPEEDUP_IP_IN),
                .SPEEDUP_IP_OUT(SPEEDUP_IP_OUT)) u_cioq (
    .clk, .rst_n,
    .mode       (cioq_mode),
    .in_valid   (cioq_in_valid),
    .in_sop     (cioq_in_sop),
    .in_eop     (cioq_in_eop),
    .in_dest    (cioq_in_dest),
    .in_data    (cioq_in_data),
    .out_valid  (cioq_out_valid),
    .out_sop    (cioq_out_sop),
    .out_eop    (cioq_out_eop),
    .out_data   (cioq_out_data),
    .out_src    (cioq_out_src),
    .ism_drop   (cioq_ism_drop),
    .in_lost    (cioq_in_lost),
    .out_lost   (cioq_out_lost),
    .orm_lost   (cioq_orm_lost),
    .orm_discard(cioq_orm_discard),
    .deferred   (cioq_deferred),
    .pass2      (cioq_pass2)
  );

endmodule
