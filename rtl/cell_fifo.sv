// cell_fifo: single FIFO cell queue of the CIOQ switch, used both as the
// input queue and as the output queue of a port.
//
// Up to W_WR cells can be written and up to W_RD cells read per slot, which
// is what a switch with internal speed-up 2 needs (two cells leave an input
// queue, or reach an output queue, in one slot). Each entry holds a cell and
// a tag of TAG_W bits: the destination output in an input queue, the source
// input in an output queue. The first W_RD entries are visible on head_*;
// rd_cnt (at most the number of visible entries) removes that many at the end
// of the slot. Writes are taken in port order while space lasts; a cell that
// finds the queue full is lost and wr_lost pulses.
// The single-FIFO organisation and the speed-up follow the CIOQ architecture;
// the circular-buffer implementation and the loss rule are this design's
// choice.
module cell_fifo
  import switch_pkg::*;
#(
  parameter int unsigned DEPTH = 16 * 30000,  // cells
  parameter int unsigned TAG_W = 4,
  parameter int unsigned W_WR  = 2,
  parameter int unsigned W_RD  = 2
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [W_WR-1:0]          wr_valid,
  input  cell_t                    wr_cell [W_WR],
  input  logic [TAG_W-1:0]         wr_tag  [W_WR],
  output logic                     wr_lost,
  input  logic [$clog2(W_RD+1)-1:0] rd_cnt,
  output logic [W_RD-1:0]          head_valid,
  output cell_t                    head_cell [W_RD],
  output logic [TAG_W-1:0]         head_tag  [W_RD],
  output logic [$clog2(DEPTH+1)-1:0] level
);
  localparam int unsigned PW = $clog2(DEPTH);
  localparam int unsigned CW = $clog2(DEPTH + 1);

  typedef struct packed {
    logic [TAG_W-1:0] tag;
    cell_t            c;
  } entry_t;

  entry_t        mem [DEPTH];
  logic [PW-1:0] rd_ptr, wr_ptr;

  function automatic logic [PW-1:0] padd(logic [PW-1:0] p, int unsigned k);
    logic [PW:0] s;
    s = (PW+1)'(p) + (PW+1)'(k);
    if (s >= (PW+1)'(DEPTH)) s = s - (PW+1)'(DEPTH);
    return s[PW-1:0];
  endfunction

  logic [W_WR-1:0]     acc;
  logic [PW-1:0]       waddr [W_WR];
  logic [CW-1:0]       n_wr;

  always_comb begin
    acc     = '0;
    n_wr    = '0;
    wr_lost = 1'b0;
    for (int e = 0; e < W_WR; e++) begin
      waddr[e] = padd(wr_ptr, int'(n_wr));
      if (wr_valid[e]) begin
        if (level + n_wr < CW'(DEPTH)) begin
          acc[e] = 1'b1;
          n_wr   = n_wr + 1'b1;
        end else begin
          wr_lost = 1'b1;
        end
      end
    end
    for (int k = 0; k < W_RD; k++) begin
      head_valid[k] = level > CW'(k);
      head_cell[k]  = mem[padd(rd_ptr, k)].c;
      head_tag[k]   = mem[padd(rd_ptr, k)].tag;
    end
  end

  always_ff @(posedge clk) begin
    for (int e = 0; e < W_WR; e++)
      if (acc[e]) mem[waddr[e]] <= '{tag: wr_tag[e], c: wr_cell[e]};
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      level  <= '0;
    end else begin
      rd_ptr <= padd(rd_ptr, int'(rd_cnt));
      wr_ptr <= padd(wr_ptr, int'(n_wr));
      level  <= level + n_wr - CW'(rd_cnt);
    end
  end

  // only visible entries can be read
  assert property (@(posedge clk) disable iff (!rst_n) CW'(rd_cnt) <= level);

endmodule
