// tb_crossbar: random matchings through a 4 x 4 fabric.
//
// Every slot a random partial permutation is applied; each output must carry
// exactly the cell of the input matched to it, tagged with that input, and
// unmatched outputs must be idle.
module tb_crossbar;
  import switch_pkg::*;
  localparam int unsigned N = 4;
  logic [N-1:0]         in_en, out_valid;
  logic [1:0]           in_dest [N], out_src [N];
  cell_t                in_cell [N], out_cell [N];
  int checks = 0, failures = 0;

  crossbar #(.N(N)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int perm [N];
    int owner [N];
    for (int t = 0; t < 500; t++) begin
      for (int k = 0; k < N; k++) perm[k] = k;
      perm.shuffle();
      for (int j = 0; j < N; j++) owner[j] = -1;
      for (int i = 0; i < N; i++) begin
        in_en[i]   = ($urandom % 4) != 0;
        in_dest[i] = 2'(perm[i]);
        in_cell[i] = '{first: 1'($urandom), last: 1'($urandom), data: $urandom};
        if (in_en[i]) owner[perm[i]] = i;
      end
      #1;
      for (int j = 0; j < N; j++) begin
        checks++;
        if (owner[j] < 0) begin
          if (out_valid[j]) failures++;
        end else if (!out_valid[j] || out_cell[j] != in_cell[owner[j]] ||
                     out_src[j] != 2'(owner[j])) begin
          failures++;
          $display("output %0d wrong", j);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
