// islip_sched: iSLIP matching scheduler for an N x N input-queued cell
// switch, working in cell mode or in packet mode.
//
// Metric: queue occupancy (a request from input i to output j whenever Q_ij
// is not empty). Heuristic: iterative search. In each of ITER iterations every
// unmatched output grants the requesting unmatched input found first from its
// round-robin grant pointer, and every unmatched input accepts, among the
// grants it received, the output found first from its round-robin accept
// pointer. Pointers move one place beyond the partner only for matches made in
// the first iteration, so that they desynchronise.
//
// Packet mode: when an input starts a packet of k > 1 cells towards output j,
// the pair (i, j) is held for the following k-1 slots: the held pairs are
// matched first, as if their weight were infinite, and the rest of the inputs
// and outputs are matched by iSLIP. Holding a pair needs one flag and one
// output number per input. The pair is released in the slot that carries the
// last cell of the packet, which the input reports on xfer_last.
// In cell mode no pair is ever held. The mode can be changed at any slot;
// pairs held when switching to cell mode are dropped.
//
// Timing: fully combinational from the requests and the registered pointers
// and held pairs; the match is used by the fabric in the same slot.
// The metric, the heuristic, round-robin contention resolution and the
// packet-mode rule follow the scheduling algorithm as specified; the pointer
// update rule and the number of iterations come from common iSLIP practice.
module islip_sched
  import switch_pkg::*;
#(
  parameter int unsigned N    = 16,  // ports
  parameter int unsigned ITER = 4    // iSLIP iterations per slot
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  sched_mode_e           mode,
  input  logic [N-1:0]          req [N],        // req[i][j]: Q_ij not empty
  input  logic [N-1:0]          xfer_last,      // cell sent by input i is last of its packet
  output logic [N-1:0]          match_valid,    // input i sends a cell this slot
  output logic [$clog2(N)-1:0]  match_out [N],  // ... to this output
  output logic [N-1:0]          match_held      // the match of input i is a held pair
);
  localparam int unsigned DW = $clog2(N);

  logic [DW-1:0] gptr [N];   // per output
  logic [DW-1:0] aptr [N];   // per input
  logic [N-1:0]  hold_v;
  logic [DW-1:0] hold_o [N];

  // index of the first set bit of v at or after position p (round robin)
  function automatic logic [DW-1:0] rr_pick(logic [N-1:0] v, logic [DW-1:0] p);
    logic [DW-1:0] r;
    r = p;
    for (int k = N - 1; k >= 0; k--) begin
      logic [DW:0] idx;
      idx = {1'b0, p} + (DW+1)'(k);
      if (idx >= (DW+1)'(N)) idx = idx - (DW+1)'(N);
      if (v[idx[DW-1:0]]) r = idx[DW-1:0];
    end
    return r;
  endfunction

  logic [N-1:0]  in_m, out_m;          // matched inputs / outputs
  logic [DW-1:0] m_out [N];
  logic [N-1:0]  first_acc;            // matched in the first iSLIP iteration
  logic [N-1:0]  grant [N];            // grant[i][j]: output j grants input i
  logic [DW-1:0] gsel  [N];
  logic [N-1:0]  rq;
  logic [DW-1:0] acc;

  always_comb begin
    in_m      = '0;
    out_m     = '0;
    match_valid = '0;
    rq        = '0;
    acc       = '0;
    for (int i = 0; i < N; i++) match_out[i] = '0;
    first_acc = '0;
    match_held = '0;
    for (int i = 0; i < N; i++) m_out[i] = '0;
    for (int i = 0; i < N; i++) grant[i] = '0;
    for (int j = 0; j < N; j++) gsel[j] = '0;

    // held pairs first (packet mode)
    if (mode == PACKET_MODE) begin
      for (int i = 0; i < N; i++) begin
        if (hold_v[i]) begin
          // the output stays reserved even if the queue is momentarily empty
          out_m[hold_o[i]] = 1'b1;
          in_m[i]          = 1'b1;
          m_out[i]         = hold_o[i];
          match_held[i]    = req[i][hold_o[i]];
        end
      end
    end

    for (int it = 0; it < ITER; it++) begin
      // grant phase
      for (int i = 0; i < N; i++) grant[i] = '0;
      for (int j = 0; j < N; j++) begin
        for (int i = 0; i < N; i++) rq[i] = req[i][j] && !in_m[i];
        if (!out_m[j] && rq != '0) begin
          gsel[j] = rr_pick(rq, gptr[j]);
          grant[gsel[j]][j] = 1'b1;
        end
      end
      // accept phase
      for (int i = 0; i < N; i++) begin
        if (!in_m[i] && grant[i] != '0) begin
          acc      = rr_pick(grant[i], aptr[i]);
          in_m[i]  = 1'b1;
          out_m[acc] = 1'b1;
          m_out[i] = acc;
          if (it == 0) first_acc[i] = 1'b1;
        end
      end
    end

    for (int i = 0; i < N; i++) begin
      match_out[i]   = m_out[i];
      match_valid[i] = in_m[i] && req[i][m_out[i]];
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      hold_v <= '0;
      for (int k = 0; k < N; k++) begin
        gptr[k]   <= '0;
        aptr[k]   <= '0;
        hold_o[k] <= '0;
      end
    end else begin
      for (int i = 0; i < N; i++) begin
        if (first_acc[i]) begin
          aptr[i]        <= DW'((int'(m_out[i]) + 1) % N);
          gptr[m_out[i]] <= DW'((i + 1) % N);
        end
        if (mode != PACKET_MODE) begin
          hold_v[i] <= 1'b0;
        end else if (match_valid[i]) begin
          hold_v[i] <= !xfer_last[i];
          hold_o[i] <= m_out[i];
        end
      end
    end
  end

  // a match never uses an output twice
  always_comb begin
    for (int a = 0; a < N; a++)
      for (int b = a + 1; b < N; b++)
        assert (!(match_valid[a] && match_valid[b] && match_out[a] == match_out[b]));
  end

endmodule
