// router_checker: scoreboard for a packet router driven by traffic_gen.
//
// It watches the input lines and records every complete packet of an input
// in arrival order. When the router admits the oldest pending packet of an
// input (adm_start: its first cell enters the switch queues) the packet is
// expected at its output; when the router discards it (adm_drop) it is
// forgotten. At each output the cells of a packet must arrive in consecutive
// slots with correct framing, carry the source in out_src and the words in
// order, and the packet must be the next one expected from that source to
// that output; expected packets that are skipped are counted as missing
// (lost inside the switch), and the testbench decides whether that is allowed.
// Errors and checks are counted in checks/failures.
module router_checker
  import switch_pkg::*;
#(
  parameter int unsigned N = 4
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [N-1:0]           in_valid,
  input  logic [N-1:0]           in_sop,
  input  logic [N-1:0]           in_eop,
  input  logic [$clog2(N)-1:0]   in_dest [N],
  input  logic [CELL_DATA_W-1:0] in_data [N],
  input  logic [N-1:0]           adm_start,
  input  logic [N-1:0]           adm_drop,
  input  logic [N-1:0]           out_valid,
  input  logic [N-1:0]           out_sop,
  input  logic [N-1:0]           out_eop,
  input  logic [CELL_DATA_W-1:0] out_data [N],
  input  logic [$clog2(N)-1:0]   out_src [N],
  output int                     checks,
  output int                     failures,
  output int                     delivered,
  output int                     dropped,
  output int                     interleaved,  // packets whose source differs from the previous one at that output
  output int                     missing       // admitted packets skipped at their output (lost inside the switch)
);
  typedef struct {
    int unsigned dest;
    int unsigned seq;
    int unsigned len;
  } pkt_t;

  pkt_t        pend [N][$];
  pkt_t        exp_q [N][N][$];
  int unsigned rx_len [N];
  int unsigned o_pos [N];
  int unsigned o_src [N];
  bit          o_busy [N];
  pkt_t        o_pkt [N];

  task automatic fail(string msg);
    failures++;
    if (failures < 10) $display("CHECK FAILED at %0t: %s", $time, msg);
  endtask

  always @(posedge clk) begin
    if (!rst_n) begin
      checks = 0; failures = 0; delivered = 0; dropped = 0; interleaved = 0; missing = 0;
      for (int i = 0; i < N; i++) begin
        pend[i].delete(); rx_len[i] = 0; o_busy[i] = 0; o_pos[i] = 0; o_src[i] = 0;
        for (int j = 0; j < N; j++) exp_q[i][j].delete();
      end
    end else begin
      // admission decisions refer to packets complete before this slot
      for (int i = 0; i < N; i++) begin
        if (adm_start[i] || adm_drop[i]) begin
          checks++;
          if (pend[i].size() == 0) fail($sformatf("input %0d admits a packet it never got", i));
          else begin
            pkt_t p;
            p = pend[i].pop_front();
            if (adm_start[i]) exp_q[i][p.dest].push_back(p);
            else dropped++;
          end
        end
      end
      for (int i = 0; i < N; i++) begin
        if (in_valid[i]) begin
          rx_len[i] = in_sop[i] ? 1 : rx_len[i] + 1;
          if (in_eop[i]) pend[i].push_back('{dest: in_dest[i], seq: in_data[i][23:8], len: rx_len[i]});
        end
      end
      for (int j = 0; j < N; j++) begin
        if (o_busy[j] && !out_valid[j]) begin
          checks++;
          fail($sformatf("output %0d: gap inside a packet", j));
          o_busy[j] = 0;
        end
        if (out_valid[j]) begin
          checks++;
          if (out_sop[j]) begin
            int unsigned s;
            s = out_src[j];
            if (o_busy[j]) fail($sformatf("output %0d: new packet before end of previous", j));
            // packets lost inside the switch are skipped
            while (exp_q[s][j].size() > 0 && 16'(exp_q[s][j][0].seq) != out_data[j][23:8]) begin
              void'(exp_q[s][j].pop_front());
              missing++;
            end
            if (exp_q[s][j].size() == 0) begin
              fail($sformatf("output %0d: unexpected packet from %0d", j, s));
              o_busy[j] = 0;
              continue;
            end
            if (delivered > 0 && s != o_src[j]) interleaved++;
            o_pkt[j]  = exp_q[s][j].pop_front();
            o_src[j]  = s;
            o_pos[j]  = 0;
            o_busy[j] = 1;
          end
          if (!o_busy[j]) begin
            fail($sformatf("output %0d: cell outside a packet", j));
          end else begin
            if (out_data[j] != {8'(o_src[j]), 16'(o_pkt[j].seq), 8'(o_pos[j])} ||
                out_src[j] != ($clog2(N))'(o_src[j]))
              fail($sformatf("output %0d: word %h, expected src %0d seq %0d idx %0d",
                             j, out_data[j], o_src[j], o_pkt[j].seq, o_pos[j]));
            o_pos[j]++;
            if (out_eop[j]) begin
              checks++;
              if (o_pos[j] != o_pkt[j].len) fail($sformatf("output %0d: packet length %0d, expected %0d", j, o_pos[j], o_pkt[j].len));
              o_busy[j] = 0;
              delivered++;
            end else if (o_pos[j] >= o_pkt[j].len) begin
              fail($sformatf("output %0d: packet too long", j));
            end
          end
        end
      end
    end
  end

  // number of packets admitted but not yet delivered
  function automatic int outstanding();
    int n;
    n = 0;
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) n += exp_q[i][j].size();
    return n;
  endfunction
endmodule
