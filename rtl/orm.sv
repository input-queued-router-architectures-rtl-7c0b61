// orm: output reassembly module and packet FIFO of one router output.
//
// Cells reach the output from the fabric (up to W_IN per slot), each tagged
// with the input it came from. Cells of packets from different inputs may be
// interleaved, so one reassembly machine per input is kept: a ring buffer of
// DEPTH cells plus the length of the packet under construction. When the last
// cell of a packet arrives the packet is complete and a descriptor (source,
// length) enters the packet FIFO. The packet FIFO is served in order: the
// cells of the packet at its head are sent on the line one per slot
// (out_valid, out_sop on the first cell, out_eop on the last), always
// contiguously. A cell that finds its ring full is lost (cell_lost); the rest
// of that packet is still collected and then discarded as a whole
// (pkt_discard) when it reaches the head of the packet FIFO. A packet that
// is still open when the next first cell from the same input arrives lost its
// tail before reaching this module; its cells are taken back from the ring
// and it is discarded too (pkt_discard).
//
// Timing: a packet whose last cell arrives in slot t can start on the line
// in slot t+1; one descriptor is served per slot when the line is idle.
// Reassembly per source, the packet FIFO and sequential transfer follow the
// router architecture; ring sizes and the loss handling are this design's
// choice.
module orm
  import switch_pkg::*;
#(
  parameter int unsigned N        = 16,                // sources (router inputs)
  parameter int unsigned DEPTH    = 2 * MAX_PKT_CELLS, // cells per reassembly ring
  parameter int unsigned W_IN     = 1,                 // cells accepted per slot
  parameter int unsigned PF_DEPTH = N * DEPTH          // packet FIFO entries
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic [W_IN-1:0]              in_valid,
  input  cell_t                        in_cell [W_IN],
  input  logic [$clog2(N)-1:0]         in_src  [W_IN],
  output logic                         out_valid,
  output logic                         out_sop,
  output logic                         out_eop,
  output logic [CELL_DATA_W-1:0]       out_data,
  output logic [$clog2(N)-1:0]         out_src,
  output logic                         cell_lost,
  output logic                         pkt_discard
);
  localparam int unsigned SW  = $clog2(N);
  localparam int unsigned PW  = $clog2(DEPTH);
  localparam int unsigned CW  = $clog2(DEPTH + 1);
  localparam int unsigned FW  = $clog2(PF_DEPTH);
  localparam int unsigned FCW = $clog2(PF_DEPTH + 1);
  localparam int unsigned AW  = $clog2(N * DEPTH);

  typedef struct packed {
    logic [SW-1:0] src;
    logic [CW-1:0] len;
    logic          bad;
  } pdesc_t;

  logic [CELL_DATA_W-1:0] ring [N * DEPTH];
  logic [PW-1:0]          wptr [N];
  logic [PW-1:0]          rptr [N];
  logic [CW-1:0]          cnt  [N];
  logic [CW-1:0]          rx_len [N];
  logic                   rx_bad [N];

  pdesc_t                 pf [PF_DEPTH];
  logic [FW-1:0]          pf_wr, pf_rd;
  logic [FCW-1:0]         pf_cnt;

  logic                   tx_active;
  logic [SW-1:0]          tx_src;
  logic [CW-1:0]          tx_len, tx_pos;

  function automatic logic [PW-1:0] padd(logic [PW-1:0] p, logic [CW-1:0] k);
    logic [PW+CW:0] s;
    s = (PW+CW+1)'(p) + (PW+CW+1)'(k);
    if (s >= (PW+CW+1)'(DEPTH)) s = s - (PW+CW+1)'(DEPTH);
    return s[PW-1:0];
  endfunction

  function automatic logic [AW-1:0] addr(logic [SW-1:0] s, logic [PW-1:0] p);
    return AW'(int'(s) * DEPTH + int'(p));
  endfunction

  // ---------------- write side: W_IN cells, possibly to the same ring -------
  logic [W_IN-1:0] acc;
  logic [AW-1:0]   waddr [W_IN];
  logic [W_IN-1:0] push;
  pdesc_t          push_d [W_IN];
  logic [CW-1:0]   t_len [N];
  logic            t_bad [N];
  logic [CW-1:0]   t_cnt [N];
  logic [CW-1:0]   wr_n  [N];
  logic [CW-1:0]   rew   [N];   // cells of an abandoned packet to take back
  logic            abandon;
  logic [SW-1:0]   ws;

  // ---------------- read side ----------------
  pdesc_t        head;
  logic          start, drop;
  logic [SW-1:0] s_src;
  logic [CW-1:0] s_len, s_pos;
  logic [N-1:0]  rd_one;
  logic [CW-1:0] drop_len;

  assign head = pf[pf_rd];

  always_comb begin
    start    = 1'b0;
    drop     = 1'b0;
    drop_len = '0;
    s_src    = tx_src;
    s_len    = tx_len;
    s_pos    = tx_pos;
    if (!tx_active && pf_cnt != '0) begin
      s_src = head.src;
      s_len = head.len;
      s_pos = '0;
      if (head.bad) begin
        drop     = 1'b1;
        drop_len = head.len;
      end else begin
        start = 1'b1;
      end
    end
    out_valid = tx_active || start;
    out_src   = s_src;
    out_sop   = out_valid && (s_pos == '0);
    out_eop   = out_valid && (s_pos == s_len - 1'b1);
    out_data  = ring[addr(s_src, rptr[s_src])];
    rd_one    = '0;
    if (out_valid) rd_one[s_src] = 1'b1;
  end
  assign pkt_discard = drop || abandon;

  always_comb begin
    acc  = '0;
    push = '0;
    cell_lost = 1'b0;
    for (int s = 0; s < N; s++) begin
      t_len[s] = rx_len[s];
      t_bad[s] = rx_bad[s];
      // space freed in this slot is not reused before the next one
      t_cnt[s] = cnt[s];
      wr_n[s]  = '0;
      rew[s]   = '0;
    end
    abandon = 1'b0;
    for (int e = 0; e < W_IN; e++) begin
      waddr[e]  = '0;
      push_d[e] = '0;
      ws = in_src[e];
      if (in_valid[e]) begin
        if (in_cell[e].first) begin
          // a packet left open (its tail was lost upstream) is thrown away
          if (t_len[ws] != '0) begin
            abandon   = 1'b1;
            rew[ws]   = rew[ws] + t_len[ws];
            t_cnt[ws] = t_cnt[ws] - t_len[ws];
          end
          t_len[ws] = '0;
          t_bad[ws] = 1'b0;
        end
        if (t_cnt[ws] < CW'(DEPTH)) begin
          acc[e]   = 1'b1;
          waddr[e] = addr(ws, padd(padd(wptr[ws], CW'(DEPTH) - rew[ws]), wr_n[ws]));
          wr_n[ws]  = wr_n[ws] + 1'b1;
          t_cnt[ws] = t_cnt[ws] + 1'b1;
          t_len[ws] = t_len[ws] + 1'b1;
        end else begin
          t_bad[ws]  = 1'b1;
          cell_lost = 1'b1;
        end
        if (in_cell[e].last && t_len[ws] != '0) begin
          push[e]   = 1'b1;
          push_d[e] = '{src: ws, len: t_len[ws], bad: t_bad[ws]};
        end
        if (in_cell[e].last) begin
          t_len[ws] = '0;
          t_bad[ws] = 1'b0;
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    for (int e = 0; e < W_IN; e++)
      if (acc[e]) ring[waddr[e]] <= in_cell[e].data;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int s = 0; s < N; s++) begin
        wptr[s]   <= '0;
        rptr[s]   <= '0;
        cnt[s]    <= '0;
        rx_len[s] <= '0;
        rx_bad[s] <= 1'b0;
      end
      pf_wr     <= '0;
      pf_rd     <= '0;
      pf_cnt    <= '0;
      tx_active <= 1'b0;
      tx_src    <= '0;
      tx_len    <= '0;
      tx_pos    <= '0;
    end else begin
      logic [FW-1:0]  w;
      logic [FCW-1:0] c;
      for (int s = 0; s < N; s++) begin
        logic [CW-1:0] fr;
        fr = ((drop && head.src == SW'(s)) ? drop_len : '0) + CW'(rd_one[s]);
        wptr[s]   <= padd(padd(wptr[s], CW'(DEPTH) - rew[s]), wr_n[s]);
        rptr[s]   <= padd(rptr[s], fr);
        cnt[s]    <= cnt[s] + wr_n[s] - fr - rew[s];
        rx_len[s] <= t_len[s];
        rx_bad[s] <= t_bad[s];
      end
      w = pf_wr;
      c = pf_cnt;
      for (int e = 0; e < W_IN; e++) begin
        if (push[e]) begin
          pf[w] <= push_d[e];
          w = (int'(w) == PF_DEPTH - 1) ? '0 : w + 1'b1;
          c = c + 1'b1;
        end
      end
      pf_wr <= w;
      if (start || drop) begin
        pf_rd <= (int'(pf_rd) == PF_DEPTH - 1) ? '0 : pf_rd + 1'b1;
        c = c - 1'b1;
      end
      pf_cnt <= c;
      if (out_valid) begin
        tx_src    <= s_src;
        tx_len    <= s_len;
        tx_pos    <= s_pos + 1'b1;
        tx_active <= (s_pos + 1'b1) < s_len;
      end
    end
  end

  // the packet FIFO never overflows (every queued packet holds a cell)
  assert property (@(posedge clk) disable iff (!rst_n) pf_cnt <= FCW'(PF_DEPTH));

endmodule
