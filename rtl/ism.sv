// ism: input segmentation module of one router input.
//
// A packet arrives on the line one cell-sized word per slot (in_valid, with
// in_sop/in_eop framing and the output port in in_dest on the first word).
// The module works store-and-forward: it keeps the words in a ring buffer big
// enough for one maximum-size packet and only after the last word has arrived
// does it hand the packet, as a train of cells, to the cell switch.
// Up to ILS cells per slot leave on out_valid/out_cell (ILS = 1 is the plain
// router, ILS = 2 is SPEEDUP-IP-IN = 2 of the CIOQ setups).
//
// Admission: in the slot where the first cell would enter the cell-switch
// queue, the queue's free space (free_cells, supplied by the parent for the
// queue named by out_dest) must hold the whole packet; otherwise every cell of
// the packet is discarded at once and drop_pkt pulses. A packet longer than
// the buffer is discarded in the same way (too_long).
//
// Timing: a packet whose last word arrives in slot t sends its first cell in
// slot t+1 at the earliest; cells of one packet leave in consecutive slots.
// The store-and-forward behaviour, the buffer size and the whole-packet
// discard follow the router architecture; the framing signals, the
// descriptor queue and discarding over-long packets are this design's choice.
module ism
  import switch_pkg::*;
#(
  parameter int unsigned N       = 16,            // router ports
  parameter int unsigned MAX_PKT = MAX_PKT_CELLS, // buffer size in cells
  parameter int unsigned ILS     = 1              // cells per slot towards the switch
) (
  input  logic                         clk,
  input  logic                         rst_n,
  // line side (PLS)
  input  logic                         in_valid,
  input  logic                         in_sop,
  input  logic                         in_eop,
  input  logic [$clog2(N)-1:0]         in_dest,
  input  logic [CELL_DATA_W-1:0]       in_data,
  // cell-switch side (ILS)
  input  logic [31:0]                  free_cells,
  output logic [ILS-1:0]               out_valid,
  output cell_t [ILS-1:0]              out_cell,
  output logic [$clog2(N)-1:0]         out_dest,
  output logic                         drop_pkt,
  output logic                         too_long
);
  localparam int unsigned PW = $clog2(MAX_PKT);
  localparam int unsigned LW = $clog2(MAX_PKT + 1);
  localparam int unsigned DW = $clog2(N);

  typedef struct packed {
    logic [DW-1:0] dest;
    logic [LW-1:0] len;
    logic          bad;
  } desc_t;

  // ---------------- ring buffer of packet words ----------------
  logic [CELL_DATA_W-1:0] ring [MAX_PKT];
  logic [PW-1:0]          wr_ptr, rd_ptr;
  logic [LW-1:0]          count;

  // packet being received
  logic [DW-1:0] rx_dest;
  logic [LW-1:0] rx_len;
  logic          rx_bad;

  // descriptors of complete packets
  desc_t         dq [MAX_PKT];
  logic [PW-1:0] dq_wr, dq_rd;
  logic [LW-1:0] dq_cnt;

  // packet being sent
  logic          tx_active;
  logic [DW-1:0] tx_dest;
  logic [LW-1:0] tx_len, tx_pos;

  function automatic logic [PW-1:0] ptr_add(logic [PW-1:0] p, int unsigned k);
    int unsigned s;
    s = int'(p) + k;
    if (s >= MAX_PKT) s = s - MAX_PKT;
    return PW'(s);
  endfunction

  // send-side decision, worked out below
  desc_t         head;
  logic          start, drop;
  logic [LW-1:0] s_len, s_pos, rd_go, drop_len;
  logic [DW-1:0] s_dest;

  // ---------------- receive side ----------------
  logic          wr_en;
  logic [DW-1:0] cur_dest;
  assign cur_dest = in_sop ? in_dest : rx_dest;
  // space freed by this slot's reads and discards can be reused at once
  assign wr_en    = in_valid && ((LW+1)'(count) < (LW+1)'(MAX_PKT) + (LW+1)'(rd_go) + (LW+1)'(drop_len)) &&
                    !(in_sop ? 1'b0 : rx_bad);

  // ---------------- send side (combinational decision) ----------------

  assign head = dq[dq_rd];

  always_comb begin
    start    = 1'b0;
    drop     = 1'b0;
    drop_len = '0;
    s_len    = tx_len;
    s_pos    = tx_pos;
    s_dest   = tx_dest;
    if (!tx_active && dq_cnt != 0) begin
      if (head.bad || {{(32-LW){1'b0}}, head.len} > free_cells) begin
        drop     = 1'b1;
        drop_len = head.len;
      end else begin
        start  = 1'b1;
        s_len  = head.len;
        s_pos  = '0;
        s_dest = head.dest;
      end
    end
    rd_go     = '0;
    out_valid = '0;
    out_cell  = '0;
    out_dest  = tx_active ? tx_dest : head.dest;
    if (tx_active || start) begin
      for (int unsigned e = 0; e < ILS; e++) begin
        if (s_pos + LW'(e) < s_len) begin
          out_valid[e]      = 1'b1;
          out_cell[e].data  = ring[ptr_add(rd_ptr, e)];
          out_cell[e].first = (s_pos + LW'(e) == '0);
          out_cell[e].last  = (s_pos + LW'(e) == s_len - 1'b1);
          rd_go             = rd_go + 1'b1;
        end
      end
    end
  end

  assign drop_pkt = drop;

  // a rejected word of a too-long packet marks the packet bad
  logic overflow;
  assign overflow = in_valid && !wr_en && !(in_sop ? 1'b0 : rx_bad);
  assign too_long = in_valid && in_eop && (overflow || (!in_sop && rx_bad));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wr_ptr    <= '0;
      rd_ptr    <= '0;
      count     <= '0;
      rx_dest   <= '0;
      rx_len    <= '0;
      rx_bad    <= 1'b0;
      dq_wr     <= '0;
      dq_rd     <= '0;
      dq_cnt    <= '0;
      tx_active <= 1'b0;
      tx_dest   <= '0;
      tx_len    <= '0;
      tx_pos    <= '0;
    end else begin
      // receive
      if (wr_en) begin
        ring[wr_ptr] <= in_data;
      end
      if (in_valid) begin
        logic [LW-1:0] nlen;
        logic          nbad;
        nlen = (in_sop ? '0 : rx_len) + LW'(wr_en);
        nbad = (in_sop ? 1'b0 : rx_bad) | overflow;
        rx_dest <= cur_dest;
        rx_len  <= nlen;
        rx_bad  <= nbad;
        if (in_eop) begin
          dq[dq_wr] <= '{dest: cur_dest, len: nlen, bad: nbad};
          dq_wr     <= ptr_add(dq_wr, 1);
        end
      end
      wr_ptr <= ptr_add(wr_ptr, wr_en ? 1 : 0);
      // send / drop
      rd_ptr <= ptr_add(rd_ptr, int'(rd_go) + int'(drop_len));
      count  <= count + LW'(wr_en) - rd_go - drop_len;
      if (start || drop) dq_rd <= ptr_add(dq_rd, 1);
      dq_cnt <= dq_cnt + LW'(in_valid && in_eop) - LW'(start || drop);
      if (tx_active || start) begin
        tx_dest   <= s_dest;
        tx_len    <= s_len;
        tx_pos    <= s_pos + rd_go;
        tx_active <= (s_pos + rd_go) < s_len;
      end
    end
  end

  // a packet descriptor is never pushed into a full descriptor queue
  assert property (@(posedge clk) disable iff (!rst_n)
                   (in_valid && in_eop) |-> (dq_cnt < LW'(MAX_PKT) || start || drop));

endmodule
