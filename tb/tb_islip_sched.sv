// tb_islip_sched: 4 x 4 iSLIP scheduler.
//
// 1. Random requests in cell mode: the match must use only requested pairs,
//    never an input or output twice, and be maximal (4 iterations on 4 ports:
//    no unmatched input still requests an unmatched output).
// 2. Full load: with every queue non-empty the pointers desynchronise and,
//    after a few slots, every slot matches all 4 inputs.
// 3. Round robin: inputs 0 and 1 both request only output 2; grants alternate.
// 4. Packet mode: input 0 starts a 3-cell packet towards output 1; output 1
//    stays with input 0 for the next two slots although input 3 also requests
//    it, then is released; the held pair is reported.
module tb_islip_sched;
  import switch_pkg::*;
  localparam int unsigned N = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  sched_mode_e mode;
  logic [N-1:0] req [N];
  logic [N-1:0] xfer_last, match_valid, match_held;
  logic [1:0]   match_out [N];
  int checks = 0, failures = 0;

  islip_sched #(.N(N), .ITER(4)) dut (.*);

  task automatic check(bit c, string m);
    checks++;
    if (!c) begin failures++; $display("CHECK FAILED: %s", m); end
  endtask

  task automatic check_match(bit want_maximal);
    logic [N-1:0] om;
    om = '0;
    for (int i = 0; i < N; i++) if (match_valid[i]) begin
      check(req[i][match_out[i]], "match on a requested pair");
      check(!om[match_out[i]], "output used once");
      om[match_out[i]] = 1'b1;
    end
    if (want_maximal)
      for (int i = 0; i < N; i++)
        for (int j = 0; j < N; j++)
          if (!match_valid[i] && !om[j]) check(!req[i][j], "maximal match");
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int full, last_in;
    mode = CELL_MODE; xfer_last = '1;
    for (int i = 0; i < N; i++) req[i] = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk); #1;
    // 1
    for (int t = 0; t < 300; t++) begin
      for (int i = 0; i < N; i++) req[i] = 4'($urandom);
      #1 check_match(1);
      @(posedge clk); #1;
    end
    // 2
    for (int i = 0; i < N; i++) req[i] = '1;
    full = 0;
    for (int t = 0; t < 12; t++) begin
      #1 check_match(1);
      if (t >= 4) check(match_valid == '1, "full match under full load");
      @(posedge clk); #1;
    end
    // 3
    for (int i = 0; i < N; i++) req[i] = '0;
    req[0] = 4'b0100; req[1] = 4'b0100;
    #1 last_in = match_valid[0] ? 0 : 1;
    check(match_valid[0] ^ match_valid[1], "one of two contenders served");
    for (int t = 0; t < 6; t++) begin
      @(posedge clk); #1;
      check(match_valid[0] ^ match_valid[1], "one of two contenders served");
      check((match_valid[0] ? 0 : 1) != last_in, "round-robin alternation");
      last_in = match_valid[0] ? 0 : 1;
    end
    // 4
    mode = PACKET_MODE;
    for (int i = 0; i < N; i++) req[i] = '0;
    @(posedge clk); #1;
    req[0] = 4'b0010;
    xfer_last = '0;              // first cell of a 3-cell packet
    #1 check(match_valid[0] && match_out[0] == 2'd1 && !match_held[0], "packet starts");
    @(posedge clk); #1;
    req[3] = 4'b0010;            // a competitor for output 1
    #1 check(match_valid[0] && match_out[0] == 2'd1 && match_held[0] && !match_valid[3], "held, 2nd cell");
    xfer_last[0] = 1'b0;
    @(posedge clk); #1;
    xfer_last[0] = 1'b1;         // third and last cell
    #1 check(match_valid[0] && match_held[0] && !match_valid[3], "held, last cell");
    @(posedge clk); #1;
    #1 check(!match_held[0], "released after the last cell");
    check(match_valid[3] || match_valid[0], "output 1 matched afresh");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
