// crossbar: non-blocking, memoryless N x N switching fabric.
//
// In every slot the scheduler's match configures the fabric: input i, when
// in_en[i] is set, is connected to output in_dest[i]. At most one cell leaves
// each input and at most one cell reaches each output per slot; the match is
// required to be conflict-free, which an assertion checks. The fabric adds no
// delay: it is a set of N output multiplexers. Each delivered cell is tagged
// with the number of the input it came from (out_src), which the output side
// needs to keep the packets of different inputs apart.
// The fabric's behaviour follows the cell-switch model; the source tag is
// this design's choice.
module crossbar
  import switch_pkg::*;
#(
  parameter int unsigned N = 16
) (
  input  logic [N-1:0]          in_en,
  input  logic [$clog2(N)-1:0]  in_dest [N],
  input  cell_t                 in_cell [N],
  output logic [N-1:0]          out_valid,
  output cell_t                 out_cell [N],
  output logic [$clog2(N)-1:0]  out_src [N]
);
  always_comb begin
    out_valid = '0;
    for (int j = 0; j < N; j++) begin
      out_cell[j] = '0;
      out_src[j]  = '0;
    end
    for (int i = 0; i < N; i++) begin
      if (in_en[i]) begin
        out_valid[in_dest[i]] = 1'b1;
        out_cell[in_dest[i]]  = in_cell[i];
        out_src[in_dest[i]]   = ($clog2(N))'(i);
      end
    end
  end

  // the configuration must be a matching: no output driven by two inputs
  always_comb begin
    for (int a = 0; a < N; a++)
      for (int b = a + 1; b < N; b++)
        assert (!(in_en[a] && in_en[b] && in_dest[a] == in_dest[b]));
  end

endmodule
