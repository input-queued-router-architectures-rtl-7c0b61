// tb_iocf_sched: self-checking testbench of the iOCF scheduler (4 ports,
// 4 iterations).
//
// Every slot random requests and random head-cell ages (from a small range,
// so that ties occur) are applied, the mode changes every 200 slots, and
// xfer_last is random. Each match is checked against what iterative
// oldest-cell-first search must give:
//  - only non-empty queues are served and no output is used twice;
//  - with as many iterations as ports, no requested pair has both its input
//    and its output left free;
//  - among the pairs not held, the oldest head cell is always served;
//  - in packet mode a pair that sent a non-last cell is matched again in the
//    next slot and reported as held; in cell mode nothing is held.
// A watchdog ends the run after 20000 cycles.
module tb_iocf_sched;
  import switch_pkg::*;
  localparam int N  = 4;

  logic clk = 0, rst_n = 0;
  sched_mode_e mode;
  logic [N-1:0]  req  [N];
  logic [31:0]   age  [N][N];
  logic [N-1:0]  xfer_last;
  logic [N-1:0]  match_valid, match_held;
  logic [1:0]    match_out [N];

  iocf_sched #(.N(N), .ITER(4), .AW(32)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_held = 0, n_match = 0;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL t=%0t %s", $time, msg);
    end
  endtask

  // reference model of the held pairs
  bit        h_v [N];
  int        h_o [N];
  longint    w   [N][N];

  task automatic weights();
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++)
        w[i][j] = req[i][j] ? longint'(age[i][j]) + 1 : 0;
  endtask

  task automatic drive();
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) begin
        req[i][j] = ($urandom % 3 != 0);
        age[i][j] = $urandom % 40;
      end
    xfer_last = N'($urandom);
  endtask

  initial begin
    mode = CELL_MODE;
    for (int i = 0; i < N; i++) begin
      h_v[i] = 0;
      h_o[i] = 0;
      for (int j = 0; j < N; j++) begin
        age[i][j] = '0;
        req[i][j] = 1'b0;
      end
    end
    xfer_last = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 4000; t++) begin
      @(negedge clk);
      if (t % 200 == 0) mode = (mode == CELL_MODE) ? PACKET_MODE : CELL_MODE;
      if (mode == CELL_MODE)
        for (int i = 0; i < N; i++) h_v[i] = 0;
      drive();
      #1;
      weights();
      begin
        bit in_u [N], out_u [N], held_in [N], held_out [N];
        longint wmax, mmax;
        for (int i = 0; i < N; i++) begin
          in_u[i] = 0; out_u[i] = 0; held_in[i] = 0; held_out[i] = 0;
        end
        // held pairs
        for (int i = 0; i < N; i++) begin
          if (mode == PACKET_MODE && h_v[i]) begin
            held_in[i] = 1;
            held_out[h_o[i]] = 1;
            in_u[i] = 1;
            out_u[h_o[i]] = 1;
            if (req[i][h_o[i]])
              check(match_valid[i] && match_out[i] == 2'(h_o[i]) && match_held[i],
                    $sformatf("held pair %0d->%0d not kept", i, h_o[i]));
            else
              check(!match_valid[i], $sformatf("held input %0d sent from an empty queue", i));
          end else begin
            check(!match_held[i], $sformatf("input %0d reported held", i));
          end
        end
        // validity
        for (int i = 0; i < N; i++) begin
          if (match_valid[i]) begin
            check(req[i][match_out[i]], $sformatf("input %0d served empty queue", i));
            for (int k = i + 1; k < N; k++)
              check(!(match_valid[k] && match_out[k] == match_out[i]), "output used twice");
            in_u[i] = 1;
            out_u[match_out[i]] = 1;
            n_match++;
          end
        end
        // maximality and the greedy property (pairs outside the held ones)
        wmax = 0;
        mmax = 0;
        for (int i = 0; i < N; i++) begin
          if (match_valid[i] && !held_in[i] && w[i][match_out[i]] > mmax)
            mmax = w[i][match_out[i]];
          for (int j = 0; j < N; j++)
            if (!held_in[i] && !held_out[j] && w[i][j] > wmax) wmax = w[i][j];
        end
        check(mmax == wmax, $sformatf("oldest cell (age+1 %0d) not served (best %0d)", wmax, mmax));
        for (int i = 0; i < N; i++)
          for (int j = 0; j < N; j++) begin
            if (req[i][j] && !(match_valid[i] && match_out[i] == 2'(j))) begin
              check(in_u[i] || out_u[j], $sformatf("pair %0d->%0d left free", i, j));
            end
          end
        // update the reference holds
        for (int i = 0; i < N; i++) begin
          if (match_held[i]) n_held++;
          if (mode == PACKET_MODE && match_valid[i]) begin
            h_v[i] = !xfer_last[i];
            h_o[i] = match_out[i];
          end
        end
      end
    end
    check(n_held > 100, $sformatf("only %0d held matches", n_held));
    check(n_match > 1000, $sformatf("only %0d matches", n_match));
    $display("held matches %0d, matches %0d", n_held, n_match);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
