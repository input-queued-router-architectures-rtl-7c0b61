// tb_cell_fifo: random traffic through a 2-write / 2-read FIFO of 8 cells.
//
// Each slot 0..2 cells are offered and 0..(visible) cells removed; a queue
// model predicts the visible head entries, the level and every loss.
module tb_cell_fifo;
  import switch_pkg::*;
  localparam int unsigned D = 8;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic [1:0] wr_valid, head_valid;
  cell_t      wr_cell [2], head_cell [2];
  logic [3:0] wr_tag [2], head_tag [2];
  logic       wr_lost;
  logic [1:0] rd_cnt;
  logic [3:0] level;
  int checks = 0, failures = 0, losses = 0;
  typedef struct { cell_t c; logic [3:0] t; } ent_t;
  ent_t model [$];

  cell_fifo #(.DEPTH(D), .TAG_W(4), .W_WR(2), .W_RD(2)) dut (.*);

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr_valid = '0; rd_cnt = '0;
    for (int e = 0; e < 2; e++) begin wr_cell[e] = '0; wr_tag[e] = '0; end
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    #1;
    for (int t = 0; t < 2000; t++) begin
      int exp_lost;
      // stimulus for this slot
      for (int e = 0; e < 2; e++) begin
        wr_valid[e] = ($urandom % 3) != 0;
        wr_cell[e]  = '{first: 1'($urandom), last: 1'($urandom), data: $urandom};
        wr_tag[e]   = 4'($urandom);
      end
      rd_cnt = 2'($urandom % (((model.size() < 2) ? model.size() : 2) + 1));
      if (t > 1000) rd_cnt = (rd_cnt != 0) ? 2'd1 : 2'd0;   // let it fill up
      #1;
      checks++;
      if (level != 4'(model.size())) begin failures++; $display("level %0d vs %0d", level, model.size()); end
      for (int k = 0; k < 2; k++) begin
        checks++;
        if (head_valid[k] != (model.size() > k)) failures++;
        else if (model.size() > k && (head_cell[k] != model[k].c || head_tag[k] != model[k].t)) failures++;
      end
      // model update: writes see the level at the start of the slot
      exp_lost = 0;
      begin
        int sz;
        sz = model.size();
        for (int e = 0; e < 2; e++)
          if (wr_valid[e]) begin
            if (sz < D) begin model.push_back('{wr_cell[e], wr_tag[e]}); sz++; end
            else exp_lost = 1;
          end
      end
      checks++;
      if (wr_lost != exp_lost[0]) failures++;
      losses += exp_lost;
      for (int k = 0; k < rd_cnt; k++) void'(model.pop_front());
      @(posedge clk);
      #1;
    end
    checks++;
    if (losses == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
