// mucs_sched: weighted MUCS matching scheduler for an N x N input-queued
// cell switch, working in cell mode or in packet mode. It is an alternative
// to islip_sched with the same match outputs, and it also reads the queue
// lengths.
//
// Metric (ML): for every non-empty queue Q_ij the weight is
//   w_ij = L_ij / sum_k L_ik + L_ij / sum_k L_kj
// i.e. the share of the queue in its input's backlog plus its share in its
// output's backlog. Each term is computed in fixed point with FW fractional
// bits, truncated: floor(L_ij * 2^FW / R_i) + floor(L_ij * 2^FW / C_j).
// Heuristic (matrix greedy): in up to N steps the largest weight among rows
// and columns not yet matched is chosen, and its row and column are removed.
// Ties go to the entry found first in a scan that starts at row rs and
// column cs; rs and cs are taken from a 16-bit LFSR every slot, so the tie
// order is pseudo-random.
//
// Packet mode: as in islip_sched, a pair (i, j) that carried a cell which is
// not the last of its packet is held in the next slot; held pairs are matched
// before the greedy steps, which then only see the rest of the matrix.
//
// Interface: req[i][j] (Q_ij not empty), qlen[i][j] (L_ij), xfer_last[i]
// (cell sent by input i ends its packet); match_valid/match_out/match_held
// as islip_sched.
// Timing: fully combinational from the queue lengths and the registered
// held pairs and LFSR; the match is used by the fabric in the same slot.
// The metric and the greedy heuristic follow the algorithm's description;
// the fixed-point format, the tie order and the LFSR are this design's
// choices.
module mucs_sched
  import switch_pkg::*;
#(
  parameter int unsigned N  = 16,  // ports
  parameter int unsigned QW = 15,  // width of a queue length
  parameter int unsigned FW = 16   // fractional bits of each weight term
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  sched_mode_e           mode,
  input  logic [N-1:0]          req  [N],
  input  logic [QW-1:0]         qlen [N][N],
  input  logic [N-1:0]          xfer_last,
  output logic [N-1:0]          match_valid,
  output logic [$clog2(N)-1:0]  match_out [N],
  output logic [N-1:0]          match_held
);
  localparam int unsigned DW = $clog2(N);
  localparam int unsigned SW = QW + DW;        // width of a row/column sum
  localparam int unsigned WW = FW + 2;         // width of a weight

  logic [N-1:0]  hold_v;
  logic [DW-1:0] hold_o [N];
  logic [15:0]   lfsr;

  logic [SW-1:0] rsum [N];
  logic [SW-1:0] csum [N];
  logic [WW-1:0] w    [N][N];

  // weights
  always_comb begin
    for (int i = 0; i < N; i++) begin
      rsum[i] = '0;
      csum[i] = '0;
    end
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) begin
        rsum[i] = rsum[i] + SW'(qlen[i][j]);
        csum[j] = csum[j] + SW'(qlen[i][j]);
      end
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) begin
        if (req[i][j] && qlen[i][j] != '0)
          w[i][j] = WW'(({SW'(qlen[i][j]), FW'(0)}) / {FW'(0), rsum[i]})
                  + WW'(({SW'(qlen[i][j]), FW'(0)}) / {FW'(0), csum[j]});
        else
          w[i][j] = '0;
      end
  end

  logic [N-1:0]  in_m, out_m;
  logic [DW-1:0] m_out [N];
  logic [DW-1:0] rs, cs;
  logic          found;
  logic [WW-1:0] best;
  logic [DW-1:0] bi, bj, ii, jj;

  assign rs = lfsr[DW-1:0];
  assign cs = lfsr[8 +: DW];

  always_comb begin
    in_m       = '0;
    out_m      = '0;
    match_held = '0;
    found      = 1'b0;
    best       = '0;
    bi         = '0;
    bj         = '0;
    ii         = '0;
    jj         = '0;
    for (int i = 0; i < N; i++) m_out[i] = '0;

    if (mode == PACKET_MODE) begin
      for (int i = 0; i < N; i++) begin
        if (hold_v[i]) begin
          out_m[hold_o[i]] = 1'b1;
          in_m[i]          = 1'b1;
          m_out[i]         = hold_o[i];
          match_held[i]    = req[i][hold_o[i]];
        end
      end
    end

    for (int step = 0; step < N; step++) begin
      found = 1'b0;
      best  = '0;
      bi    = '0;
      bj    = '0;
      for (int a = 0; a < N; a++) begin
        ii = DW'((int'(rs) + a) % N);
        for (int b = 0; b < N; b++) begin
          jj = DW'((int'(cs) + b) % N);
          if (!in_m[ii] && !out_m[jj] && w[ii][jj] != '0 && (!found || w[ii][jj] > best)) begin
            found = 1'b1;
            best  = w[ii][jj];
            bi    = ii;
            bj    = jj;
          end
        end
      end
      if (found) begin
        in_m[bi]  = 1'b1;
        out_m[bj] = 1'b1;
        m_out[bi] = bj;
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
      lfsr   <= 16'hACE1;
      for (int k = 0; k < N; k++) hold_o[k] <= '0;
    end else begin
      // x^16 + x^14 + x^13 + x^11 + 1
      lfsr <= {lfsr[14:0], lfsr[15] ^ lfsr[13] ^ lfsr[12] ^ lfsr[10]};
      for (int i = 0; i < N; i++) begin
        if (mode != PACKET_MODE) begin
          hold_v[i] <= 1'b0;
        end else if (match_valid[i]) begin
          hold_v[i] <= !xfer_last[i];
          hold_o[i] <= m_out[i];
        end
      end
    end
  end

  // no output may be used by two inputs
  always_ff @(posedge clk) begin
    if (rst_n) begin
      for (int a = 0; a < N; a++)
        for (int b = a + 1; b < N; b++)
          assert (!(match_valid[a] && match_valid[b] && match_out[a] == match_out[b]))
            else $error("mucs_sched: output %0d matched twice", match_out[a]);
    end
  end
endmodule
