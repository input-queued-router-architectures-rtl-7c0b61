// traffic_gen: on/off packet source for the router testbenches.
//
// Each of the N inputs alternates between an ON period, during which a packet
// of 1..MAX_LEN cells (uniformly chosen) arrives one word per slot, and an OFF
// period whose length is geometric: in every idle slot a new packet starts
// with probability p_start (parts per 65536). Destinations are uniform over
// the N outputs, or, with hot = 1, output 0 is chosen twice as often as each
// other output; with hot = 2 every packet goes to output 0. Every word carries {input, packet sequence number, cell
// index} so that the checker can identify it. Generation stops (after the
// packet in progress) when enable is low.
module traffic_gen
  import switch_pkg::*;
#(
  parameter int unsigned N       = 4,
  parameter int unsigned MAX_LEN = 16
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   enable,
  input  logic [1:0]             hot,        // 0 uniform, 1 hot-spot, 2 all to output 0
  input  int unsigned            p_start,
  output logic [N-1:0]           in_valid,
  output logic [N-1:0]           in_sop,
  output logic [N-1:0]           in_eop,
  output logic [$clog2(N)-1:0]   in_dest [N],
  output logic [CELL_DATA_W-1:0] in_data [N],
  output int unsigned            packets_sent
);
  int unsigned           rem  [N];
  int unsigned           idx  [N];
  logic [15:0]           seq  [N];
  logic [$clog2(N)-1:0]  dst  [N];

  always @(posedge clk) begin
    if (!rst_n) begin
      in_valid <= '0;
      in_sop   <= '0;
      in_eop   <= '0;
      packets_sent <= 0;
      for (int i = 0; i < N; i++) begin
        rem[i] = 0; idx[i] = 0; seq[i] = '0; dst[i] = '0;
        in_dest[i] <= '0; in_data[i] <= '0;
      end
    end else begin
      for (int i = 0; i < N; i++) begin
        in_valid[i] <= 1'b0;
        in_sop[i]   <= 1'b0;
        in_eop[i]   <= 1'b0;
        if (rem[i] == 0 && enable && ($urandom % 65536) < p_start) begin
          int unsigned d;
          rem[i] = 1 + ($urandom % MAX_LEN);
          idx[i] = 0;
          seq[i] = seq[i] + 1'b1;
          d = (hot == 2'd2) ? 0 : $urandom % ((hot != 2'd0) ? N + 1 : N);
          dst[i] = (d >= N) ? '0 : ($clog2(N))'(d);
        end
        if (rem[i] != 0) begin
          in_valid[i] <= 1'b1;
          in_sop[i]   <= (idx[i] == 0);
          in_eop[i]   <= (rem[i] == 1);
          in_dest[i]  <= dst[i];
          in_data[i]  <= {8'(i), seq[i], 8'(idx[i])};
          if (rem[i] == 1) packets_sent <= packets_sent + 1;
          rem[i] = rem[i] - 1;
          idx[i] = idx[i] + 1;
        end
      end
    end
  end
endmodule
