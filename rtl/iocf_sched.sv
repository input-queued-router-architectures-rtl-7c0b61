// iocf_sched: iOCF (iterative oldest cell first) matching scheduler for an
// N x N input-queued cell switch, in cell mode or packet mode. It is an
// alternative to islip_sched with the same match outputs; it also reads the
// age of the head cell of every queue.
//
// Metric (CA): w_ij = age of the cell at the head of Q_ij, in slots.
// Heuristic (iterative search), ITER iterations: every output not yet matched
// grants the request with the largest age among the inputs not yet matched;
// every input that received grants accepts the one with the largest age.
// Ties are resolved in a scan that starts at a pseudo-random position (a
// 16-bit LFSR, advanced every slot), which stands for random-order
// contention resolution at both inputs and outputs. Matches made in earlier
// iterations are kept.
//
// Packet mode: as in islip_sched, a pair that carried a cell which is not the
// last of its packet is held in the next slot and matched before the
// iterations.
//
// Interface: req[i][j] (Q_ij not empty), age[i][j] (head-cell age),
// xfer_last[i]; match_valid/match_out/match_held as islip_sched.
// Timing: fully combinational from the requests, ages and the registered
// held pairs and LFSR; the match is used in the same slot.
// Metric, heuristic and random-order contention follow the algorithm's
// classification; the LFSR tie order and the iteration count are this
// design's choices.
module iocf_sched
  import switch_pkg::*;
#(
  parameter int unsigned N    = 16,  // ports
  parameter int unsigned ITER = 4,   // iterations per slot
  parameter int unsigned AW   = 32   // width of an age
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  sched_mode_e           mode,
  input  logic [N-1:0]          req [N],
  input  logic [AW-1:0]         age [N][N],
  input  logic [N-1:0]          xfer_last,
  output logic [N-1:0]          match_valid,
  output logic [$clog2(N)-1:0]  match_out [N],
  output logic [N-1:0]          match_held
);
  localparam int unsigned DW = $clog2(N);

  logic [N-1:0]  hold_v;
  logic [DW-1:0] hold_o [N];
  logic [15:0]   lfsr;

  logic [N-1:0]  in_m, out_m;
  logic [DW-1:0] m_out [N];
  logic [N-1:0]  gr_v;            // gr_v[j]: output j granted this iteration
  logic [DW-1:0] gr_in [N];       // ... to this input
  logic          found;
  logic [AW-1:0] best;
  logic [DW-1:0] bsel, k, st;

  assign st = lfsr[DW-1:0];

  always_comb begin
    in_m       = '0;
    out_m      = '0;
    match_held = '0;
    gr_v       = '0;
    found      = 1'b0;
    best       = '0;
    bsel       = '0;
    k          = '0;
    for (int i = 0; i < N; i++) begin
      m_out[i] = '0;
      gr_in[i] = '0;
    end

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

    for (int it = 0; it < ITER; it++) begin
      // grant: each free output picks the oldest request of a free input
      gr_v = '0;
      for (int j = 0; j < N; j++) begin
        found = 1'b0;
        best  = '0;
        bsel  = '0;
        for (int a = 0; a < N; a++) begin
          k = DW'((int'(st) + a) % N);
          if (!out_m[j] && !in_m[k] && req[k][j] && (!found || age[k][j] > best)) begin
            found = 1'b1;
            best  = age[k][j];
            bsel  = k;
          end
        end
        gr_v[j]  = found;
        gr_in[j] = bsel;
      end
      // accept: each input picks the oldest of the grants it received
      for (int i = 0; i < N; i++) begin
        found = 1'b0;
        best  = '0;
        bsel  = '0;
        for (int a = 0; a < N; a++) begin
          k = DW'((int'(st) + a) % N);
          if (!in_m[i] && gr_v[k] && gr_in[k] == DW'(i) && (!found || age[i][k] > best)) begin
            found = 1'b1;
            best  = age[i][k];
            bsel  = k;
          end
        end
        if (found) begin
          in_m[i]      = 1'b1;
          out_m[bsel]  = 1'b1;
          m_out[i]     = bsel;
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
      lfsr   <= 16'h1D0F;
      for (int q = 0; q < N; q++) hold_o[q] <= '0;
    end else begin
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
            else $error("iocf_sched: output %0d matched twice", match_out[a]);
    end
  end
endmodule
