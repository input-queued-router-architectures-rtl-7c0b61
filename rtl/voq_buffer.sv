// voq_buffer: the virtual output queues of one input of the cell switch.
//
// The buffer holds N separate FIFO queues Q_ij, one per output j, each able
// to store L cells; there is no sharing of space between queues. One cell per
// slot can be written (into the queue named by wr_dest) and one cell per slot
// can be read (from the queue named by rd_sel). A cell written into a full
// queue is lost and wr_lost pulses.
//
// All queues live in one memory of N*L cells; queue j owns the words
// j*L .. j*L+L-1 and keeps its own head pointer, tail pointer and length.
// qlen[j] is the registered length L_ij at the start of the slot, which the
// scheduler uses as its request / metric. rd_cell is the head cell of queue
// rd_sel, read combinationally, so the cell chosen by the scheduler in a slot
// crosses the fabric in that same slot. heads[j] shows the head word of
// every queue at once (meaningful only where qlen[j] is not zero); a router
// uses it on a second buffer of arrival stamps to learn the age of every
// head cell. Left unconnected, it costs nothing.
// The queue organisation and the per-queue capacity L follow the router
// architecture; the single shared memory array is this design's choice.
module voq_buffer
  import switch_pkg::*;
#(
  parameter int unsigned N = 16,     // outputs, hence queues
  parameter int unsigned L = 30000   // cells per queue
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          wr_valid,
  input  logic [$clog2(N)-1:0]          wr_dest,
  input  cell_t                         wr_cell,
  output logic                          wr_lost,
  input  logic                          rd_en,
  input  logic [$clog2(N)-1:0]          rd_sel,
  output cell_t                         rd_cell,
  output cell_t                         heads [N],
  output logic [$clog2(L+1)-1:0]        qlen [N]
);
  localparam int unsigned AW = $clog2(N * L);
  localparam int unsigned PW = $clog2(L);
  localparam int unsigned CW = $clog2(L + 1);

  cell_t         mem [N * L];
  logic [PW-1:0] head [N];
  logic [PW-1:0] tail [N];

  function automatic logic [AW-1:0] addr(logic [$clog2(N)-1:0] q, logic [PW-1:0] p);
    return AW'(int'(q) * L + int'(p));
  endfunction

  function automatic logic [PW-1:0] inc(logic [PW-1:0] p);
    return (int'(p) == L - 1) ? '0 : p + 1'b1;
  endfunction

  logic do_wr, do_rd;
  assign do_wr   = wr_valid && (qlen[wr_dest] < CW'(L));
  assign wr_lost = wr_valid && !do_wr;
  assign do_rd   = rd_en && (qlen[rd_sel] != '0);
  assign rd_cell = mem[addr(rd_sel, head[rd_sel])];
  for (genvar q = 0; q < N; q++) begin : g_heads
    assign heads[q] = mem[addr(($clog2(N))'(q), head[q])];
  end

  always_ff @(posedge clk) begin
    if (do_wr) mem[addr(wr_dest, tail[wr_dest])] <= wr_cell;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int q = 0; q < N; q++) begin
        head[q] <= '0;
        tail[q] <= '0;
        qlen[q] <= '0;
      end
    end else begin
      for (int q = 0; q < N; q++) begin
        logic w, r;
        w = do_wr && (wr_dest == ($clog2(N))'(q));
        r = do_rd && (rd_sel == ($clog2(N))'(q));
        if (w) tail[q] <= inc(tail[q]);
        if (r) head[q] <= inc(head[q]);
        qlen[q] <= qlen[q] + CW'(w) - CW'(r);
      end
    end
  end

  // the scheduler only reads non-empty queues
  assert property (@(posedge clk) disable iff (!rst_n) rd_en |-> qlen[rd_sel] != '0);

endmodule
