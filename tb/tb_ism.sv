// tb_ism: input segmentation module, buffer of 8 cells, 4 destinations.
//
// Random packets of 1..8 words (and a few of 10, too long for the buffer)
// enter with random gaps. Instance A sends 1 cell per slot and sees a random
// free-space figure; instance B sends 2 cells per slot with plenty of space.
// Checked: a packet leaves only after its last word has arrived (at the
// earliest in the next slot, and exactly then when the module is idle);
// cells keep their order, framing and destination; A discards exactly the
// packets that are too long or do not fit the free space in the slot their
// first cell would enter the queue; B moves two cells per slot.
module tb_ism;
  import switch_pkg::*;
  localparam int unsigned N = 4, MP = 8;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic in_valid, in_sop, in_eop;
  logic [1:0] in_dest;
  logic [CELL_DATA_W-1:0] in_data;
  logic [31:0] free_a;
  logic [0:0] a_valid;
  cell_t [0:0] a_cell;
  logic [1:0] a_dest, b_dest;
  logic a_drop, a_long, b_drop, b_long;
  logic [1:0] b_valid;
  cell_t [1:0] b_cell;

  ism #(.N(N), .MAX_PKT(MP), .ILS(1)) dut_a (
    .clk, .rst_n, .in_valid, .in_sop, .in_eop, .in_dest, .in_data, .free_cells(free_a),
    .out_valid(a_valid), .out_cell(a_cell), .out_dest(a_dest), .drop_pkt(a_drop), .too_long(a_long));
  ism #(.N(N), .MAX_PKT(MP), .ILS(2)) dut_b (
    .clk, .rst_n, .in_valid, .in_sop, .in_eop, .in_dest, .in_data, .free_cells(32'd1000),
    .out_valid(b_valid), .out_cell(b_cell), .out_dest(b_dest), .drop_pkt(b_drop), .too_long(b_long));

  typedef struct { int len; int dest; int base; int eop_slot; } pkt_t;
  pkt_t qa [$], qb [$];
  int checks = 0, failures = 0, slot = 0;
  int a_pos = -1, b_pos = -1, n_fit_drop = 0, n_long_drop = 0, n_sent = 0;
  pkt_t a_cur, b_cur;

  task automatic check(bit c, string m);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("CHECK FAILED slot %0d: %s", slot, m); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // monitors (sample before the edge)
  always @(posedge clk) if (rst_n) begin
    slot++;
    // ---- A ----
    if (a_drop) begin
      pkt_t p;
      check(qa.size() > 0 && qa[0].eop_slot < slot, "A drops a complete packet");
      p = qa.pop_front();
      check(p.len > MP || p.len > int'(free_a), "A drop justified");
      if (p.len > MP) n_long_drop++; else n_fit_drop++;
      check(a_pos < 0, "A drop only between packets");
    end
    if (a_valid[0]) begin
      if (a_pos < 0) begin
        check(qa.size() > 0 && qa[0].eop_slot < slot, "A sends a complete packet");
        a_cur = qa.pop_front();
        check(a_cur.len <= MP && a_cur.len <= int'(free_a), "A admits only a fitting packet");
        check(a_cell[0].first, "A first flag");
        a_pos = 0;
      end
      check(a_dest == 2'(a_cur.dest), "A destination");
      check(a_cell[0].data == 32'(a_cur.base + a_pos), "A data order");
      check(a_cell[0].first == (a_pos == 0) && a_cell[0].last == (a_pos == a_cur.len - 1), "A framing");
      a_pos++;
      if (a_pos == a_cur.len) begin a_pos = -1; n_sent++; end
    end else begin
      check(a_pos < 0, "A cells of a packet are contiguous");
    end
    // ---- B ----
    if (b_drop) begin
      pkt_t p;
      p = qb.pop_front();
      check(p.len > MP, "B drops only too-long packets");
    end
    for (int e = 0; e < 2; e++) begin
      if (b_valid[e]) begin
        if (b_pos < 0) begin
          check(qb.size() > 0 && qb[0].eop_slot < slot, "B sends a complete packet");
          b_cur = qb.pop_front();
          b_pos = 0;
        end
        check(b_cell[e].data == 32'(b_cur.base + b_pos) && b_dest == 2'(b_cur.dest), "B data order");
        check(b_cell[e].last == (b_pos == b_cur.len - 1), "B framing");
        b_pos++;
        if (b_pos == b_cur.len) b_pos = -1;
      end else if (e == 0) begin
        check(b_pos < 0, "B contiguous");
      end
    end
    if (b_valid == 2'b01) check(b_cell[0].last, "B sends one cell only at a packet end");
  end

  task automatic send_pkt(int len, int dest, int base);
    for (int k = 0; k < len; k++) begin
      in_valid = 1; in_sop = (k == 0); in_eop = (k == len - 1);
      in_dest = 2'(dest); in_data = 32'(base + k);
      if (k == len - 1) begin
        qa.push_back('{len, dest, base, slot + 1});
        qb.push_back('{len, dest, base, slot + 1});
      end
      @(posedge clk); #1;
    end
    in_valid = 0; in_sop = 0; in_eop = 0;
  endtask

  initial begin
    int base, t_eop;
    in_valid = 0; in_sop = 0; in_eop = 0; in_dest = '0; in_data = '0; free_a = 1000;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk); #1;
    // latency: a 4-cell packet into the idle module leaves right after its last word
    send_pkt(4, 3, 100);
    t_eop = slot;
    check(a_valid[0] && a_cell[0].first, "first cell in the slot after the last word");
    repeat (10) @(posedge clk); #1;
    base = 1000;
    for (int t = 0; t < 600; t++) begin
      int len;
      len = ($urandom % 20 == 0) ? MP + 2 : 1 + $urandom % MP;
      free_a = 32'($urandom % 12);
      send_pkt(len, $urandom % N, base);
      base += 64;
      repeat ($urandom % 3) begin free_a = 32'($urandom % 12); @(posedge clk); #1; end
    end
    free_a = 1000;
    repeat (40) @(posedge clk); #1;
    check(qa.size() == 0 && qb.size() == 0, "every packet sent or dropped");
    check(n_fit_drop > 0 && n_long_drop > 0 && n_sent > 100, "drops of both kinds and sends");
    $display("sent %0d fit-drops %0d long-drops %0d", n_sent, n_fit_drop, n_long_drop);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
