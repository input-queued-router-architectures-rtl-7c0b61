// tb_mucs_sched: self-checking testbench of the MUCS scheduler (4 ports).
//
// Every slot random queue lengths (about a third of them zero) are applied,
// the mode changes every 200 slots, and xfer_last is random. The testbench
// computes the weights itself from the formula
//   w_ij = floor(L_ij * 2^16 / sum_k L_ik) + floor(L_ij * 2^16 / sum_k L_kj)
// and checks each match against properties any greedy matching must have:
//  - only non-empty queues are served and no output is used twice;
//  - no requested pair has both its input and its output left free;
//  - among the pairs not held, the largest weight is matched, and every
//    requested pair left out is blocked by a matched pair on its row or its
//    column whose weight is at least as large (what "largest first" means);
//  - in packet mode a pair that sent a non-last cell is matched again in the
//    next slot and reported as held, and held pairs are released after the
//    last cell; in cell mode nothing is held.
// A watchdog ends the run after 20000 cycles.
module tb_mucs_sched;
  import switch_pkg::*;
  localparam int N  = 4;
  localparam int QW = 8;

  logic clk = 0, rst_n = 0;
  sched_mode_e mode;
  logic [N-1:0]  req  [N];
  logic [QW-1:0] qlen [N][N];
  logic [N-1:0]  xfer_last;
  logic [N-1:0]  match_valid, match_held;
  logic [1:0]    match_out [N];

  mucs_sched #(.N(N), .QW(QW), .FW(16)) dut (.*);

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
  longint    rs  [N], cs [N];

  task automatic weights();
    for (int i = 0; i < N; i++) begin
      rs[i] = 0;
      cs[i] = 0;
    end
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) begin
        rs[i] += qlen[i][j];
        cs[j] += qlen[i][j];
      end
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++)
        w[i][j] = (qlen[i][j] == 0) ? 0
                : (longint'(qlen[i][j]) * 65536) / rs[i] + (longint'(qlen[i][j]) * 65536) / cs[j];
  endtask

  task automatic drive();
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) begin
        qlen[i][j] = ($urandom % 3 == 0) ? '0 : QW'(1 + $urandom % 200);
        req[i][j]  = (qlen[i][j] != '0);
      end
    xfer_last = N'($urandom);
  endtask

  initial begin
    mode = CELL_MODE;
    for (int i = 0; i < N; i++) begin
      h_v[i] = 0;
      h_o[i] = 0;
      for (int j = 0; j < N; j++) begin
        qlen[i][j] = '0;
        req[i][j]  = 1'b0;
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
        check(mmax == wmax, $sformatf("largest weight %0d not matched (best matched %0d)", wmax, mmax));
        for (int i = 0; i < N; i++)
          for (int j = 0; j < N; j++) begin
            if (req[i][j] && !(match_valid[i] && match_out[i] == 2'(j))) begin
              check(in_u[i] || out_u[j], $sformatf("pair %0d->%0d left free", i, j));
              if (!held_in[i] && !held_out[j]) begin
                bit blocked;
                blocked = 0;
                if (match_valid[i] && w[i][match_out[i]] >= w[i][j]) blocked = 1;
                for (int k = 0; k < N; k++)
                  if (match_valid[k] && !held_in[k] && match_out[k] == 2'(j) && w[k][j] >= w[i][j])
                    blocked = 1;
                check(blocked, $sformatf("pair %0d->%0d (w=%0d) lost to a lighter pair", i, j, w[i][j]));
              end
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
