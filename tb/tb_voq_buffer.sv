// tb_voq_buffer: random writes and reads on 4 queues of 8 cells.
//
// A per-queue model checks the head cell returned for every read, the queue
// lengths after every slot, and that a write into a full queue is lost while
// the other queues are unaffected. The all-heads output is compared with
// the model's head of every non-empty queue after every slot.
module tb_voq_buffer;
  import switch_pkg::*;
  localparam int unsigned N = 4, L = 8;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic       wr_valid, wr_lost, rd_en;
  logic [1:0] wr_dest, rd_sel;
  cell_t      wr_cell, rd_cell;
  cell_t      heads [N];
  logic [3:0] qlen [N];
  cell_t      model [N][$];
  int checks = 0, failures = 0, losses = 0, reads = 0;

  voq_buffer #(.N(N), .L(L)) dut (.*);

  initial begin
    #300000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr_valid = 0; rd_en = 0; wr_dest = '0; rd_sel = '0; wr_cell = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk); #1;
    for (int t = 0; t < 3000; t++) begin
      int q;
      wr_valid = ($urandom % 4) != 0;
      wr_dest  = 2'($urandom);
      wr_cell  = '{first: 1'($urandom), last: 1'($urandom), data: $urandom};
      // read a non-empty queue, less often in the middle of the run
      rd_en = 0;
      q = $urandom % N;
      if (model[q].size() > 0 && ($urandom % ((t > 1000 && t < 2000) ? 4 : 2)) == 0) begin
        rd_en = 1; rd_sel = 2'(q);
      end
      #1;
      if (rd_en) begin
        checks++; reads++;
        if (rd_cell != model[q][0]) begin failures++; $display("head of queue %0d wrong", q); end
      end
      checks++;
      if (wr_lost != (wr_valid && model[wr_dest].size() >= L)) failures++;
      if (wr_valid && model[wr_dest].size() < L) model[wr_dest].push_back(wr_cell);
      if (wr_lost) losses++;
      if (rd_en) void'(model[q].pop_front());
      @(posedge clk); #1;
      for (int k = 0; k < N; k++) begin
        checks++;
        if (qlen[k] != 4'(model[k].size())) begin failures++; $display("qlen %0d", k); end
        if (model[k].size() > 0) begin
          checks++;
          if (heads[k] != model[k][0]) begin failures++; $display("heads %0d", k); end
        end
      end
    end
    checks++;
    if (losses == 0 || reads < 100) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
