// fifo2_sched: FIFO-2 scheduler of the CIOQ switch with speed-up 2.
//
// Every input has one FIFO queue; its first two cells are visible
// (head_valid/head_dest/head_last, index 0 is the oldest). The
// algorithm is executed twice per slot. In each execution the inputs are
// scanned cyclically, starting from an input chosen round-robin (the start
// moves on by one input at every execution). Each input offers its oldest
// cell not yet sent in this slot; the transfer is enabled if no input earlier
// in the scan has already taken the cell's output in this execution,
// otherwise it waits for the next execution. So at most two cells leave each
// input and at most two cells reach each output per slot; execution e drives
// fabric pass e (grant/grant_dest/grant_idx) and sent[i] tells each input
// queue how many cells to remove.
//
// Packet mode (mode = PACKET_MODE) keeps the cells of a packet contiguous:
// a packet that starts towards output j reserves j until its last cell has
// been sent, and other inputs are refused there. With EXCL = 0 the
// reservation covers only the execution in which the packet started, so up
// to two packets can be interleaved at an output, and the holding input
// sends only in that execution; with EXCL = 1 it covers both executions, so
// packets never interleave at an output (used when cells enter the switch at
// twice the line speed). In cell mode there are no reservations.
//
// Timing: combinational from the queue heads and the registered round-robin
// pointer and reservations; the decisions are used in the same slot.
// The scan, the round-robin start and the two executions per slot follow the
// FIFO-2 algorithm; the packet-mode rules (reservation per execution or per
// output) are this design's reading of its packet-mode extension.
module fifo2_sched
  import switch_pkg::*;
#(
  parameter int unsigned N    = 16,
  parameter bit          EXCL = 1'b1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  sched_mode_e           mode,
  input  logic [1:0]            head_valid [N],
  input  logic [$clog2(N)-1:0]  head_dest  [N][2],
  input  logic [1:0]            head_last  [N],
  output logic [N-1:0]          grant      [2],    // grant[e][i]: input i sends in execution e
  output logic [$clog2(N)-1:0]  grant_dest [2][N],
  output logic                  grant_idx  [2][N], // which of the two head cells
  output logic [1:0]            sent       [N],    // cells removed from input i
  output logic [1:0]            deferred           // an execution deferred some input
);
  localparam int unsigned DW = $clog2(N);

  logic [DW-1:0] ptr;
  logic [N-1:0]  lk_v  [2];   // lk_v[e][j]: output j reserved in execution e
  logic [DW-1:0] lk_in [2][N];
  logic [N-1:0]  il_v;        // input holds a reservation
  logic          il_e  [N];   // ... started in this execution

  // next-state copies worked out in the combinational scan
  logic [N-1:0]  t_lk_v  [2];
  logic [DW-1:0] t_lk_in [2][N];
  logic [N-1:0]  t_il_v;
  logic          t_il_e  [N];
  logic [N-1:0]  eng;
  logic [DW-1:0] idx, d;
  logic          k_sel, ok;

  always_comb begin
    t_lk_v  = lk_v;
    t_lk_in = lk_in;
    t_il_v  = il_v;
    t_il_e  = il_e;
    idx = '0; d = '0; k_sel = 1'b0; ok = 1'b0; eng = '0;
    deferred = '0;
    for (int i = 0; i < N; i++) sent[i] = '0;
    for (int e = 0; e < 2; e++) begin
      grant[e] = '0;
      for (int i = 0; i < N; i++) begin
        grant_dest[e][i] = '0;
        grant_idx[e][i]  = 1'b0;
      end
    end

    for (int e = 0; e < 2; e++) begin
      eng = '0;
      for (int k = 0; k < N; k++) begin
        logic [DW:0] s;
        s   = (DW+1)'(ptr) + (DW+1)'(e) + (DW+1)'(k);
        if (s >= (DW+1)'(N)) s = s - (DW+1)'(N);
        idx   = s[DW-1:0];
        k_sel = sent[idx][0];           // 0 or 1 cells already sent
        if (sent[idx] < 2'd2 && head_valid[idx][k_sel]) begin
          d  = head_dest[idx][k_sel];
          ok = !eng[d];
          if (mode == PACKET_MODE) begin
            if (t_lk_v[e][d] && t_lk_in[e][d] != idx) ok = 1'b0;
            if (!EXCL && t_il_v[idx] && t_il_e[idx] != e[0]) ok = 1'b0;
          end
          if (ok) begin
            eng[d]             = 1'b1;
            grant[e][idx]      = 1'b1;
            grant_dest[e][idx] = d;
            grant_idx[e][idx]  = k_sel;
            sent[idx]          = sent[idx] + 2'd1;
            if (mode == PACKET_MODE) begin
              for (int x = 0; x < 2; x++) begin
                if (EXCL || x == e) begin
                  if (head_last[idx][k_sel]) begin
                    t_lk_v[x][d] = 1'b0;
                  end else begin
                    t_lk_v[x][d]  = 1'b1;
                    t_lk_in[x][d] = idx;
                  end
                end
              end
              t_il_v[idx] = !head_last[idx][k_sel];
              t_il_e[idx] = e[0];
            end
          end else begin
            deferred[e] = 1'b1;
          end
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ptr  <= '0;
      il_v <= '0;
      for (int e = 0; e < 2; e++) begin
        lk_v[e] <= '0;
        for (int j = 0; j < N; j++) lk_in[e][j] <= '0;
      end
      for (int i = 0; i < N; i++) il_e[i] <= 1'b0;
    end else begin
      ptr <= DW'((int'(ptr) + 2) % N);
      if (mode == PACKET_MODE) begin
        lk_v  <= t_lk_v;
        lk_in <= t_lk_in;
        il_v  <= t_il_v;
        il_e  <= t_il_e;
      end else begin
        lk_v[0] <= '0;
        lk_v[1] <= '0;
        il_v    <= '0;
      end
    end
  end

endmodule
