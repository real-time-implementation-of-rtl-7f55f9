// tb_mem_ctrl: a 40x30 frame is written through the controller into a
// memory model; then interest points (one near a corner, so the window is
// clamped, one at each scale) and frame markers are queued. The test checks
// the write addresses and bank, that a point of the frame still being
// written waits for the bank swap, the order and addresses of the 26x26
// read requests under random rd_ready stalls and a 3-cycle read latency,
// that the samples reach the extractor unchanged, and that markers are
// forwarded only when the extractor is idle.
`timescale 1ns/1ps
`include "tb_util.svh"
module tb_mem_ctrl;
  import surf_pkg::*;
  localparam int W = 40, H = 30, NB = 26;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic ii_valid = 0, ii_frame_end = 0;
  logic [IW-1:0] ii = 0, wr_data, rd_data = 0, nb_data;
  logic [19:0] ii_addr = 0;
  logic wr_en, wr_bank, rd_req, rd_ready = 0, rd_valid = 0, ip_pop, ext_start, nb_valid;
  logic [20:0] wr_addr, rd_addr;
  logic ip_empty;
  ip_t ip_head;
  logic [1:0] ext_scale;
  logic ext_busy = 0, ext_done = 0, dfifo_full = 0, marker_push;
  mem_ctrl #(.W(W), .H(H), .NB(NB)) dut (.clk, .rst, .ii_valid, .ii, .ii_addr, .ii_frame_end,
    .wr_en, .wr_addr, .wr_data, .wr_bank, .rd_req, .rd_addr, .rd_ready, .rd_valid, .rd_data,
    .ip_empty, .ip_head, .ip_pop, .ext_start, .ext_scale, .nb_valid, .nb_data,
    .ext_busy, .ext_done, .dfifo_full, .marker_push);
  `WATCHDOG(40000)

  logic [IW-1:0] mem [int];
  ip_t ipq [$];
  assign ip_empty = ipq.size() == 0;
  assign ip_head  = ip_empty ? '0 : ipq[0];

  int exp_addr [$];
  logic [IW-1:0] lat_q [$];
  int lat_t [$];
  int nreq = 0, nsamp = 0, nstall = 0, nmark = 0, npts = 0, cyc = 0;
  logic [1:0] cur_scale;

  // memory, FIFO and extractor models
  always @(posedge clk) begin
    cyc++;
    if (wr_en) mem[int'(wr_addr)] = wr_data;
    if (rd_req && rd_ready) begin
      int e;
      e = exp_addr.pop_front();
      `CHECK(int'(rd_addr) == e, $sformatf("request %0d: addr %0d vs %0d", nreq, rd_addr, e))
      lat_q.push_back(mem.exists(int'(rd_addr)) ? mem[int'(rd_addr)] : '0);
      lat_t.push_back(cyc + 3);
      nreq++;
    end
    if (rd_req && !rd_ready) nstall++;
    if (ip_pop) begin
      ip_t p;
      p = ipq.pop_front();
      if (p.marker) begin
        `CHECK(marker_push && !ext_start, "marker forwarded")
        `CHECK(!ext_busy, "marker only when extractor idle")
        nmark++;
      end else begin
        `CHECK(ext_start && !marker_push && ext_scale == p.scale, "point starts extractor")
        `CHECK(p.bank != wr_bank, "point of a complete frame")
        cur_scale = p.scale;
        npts++;
      end
    end
    if (nb_valid) nsamp++;
  end

  // extractor model: busy from start until 676 samples plus a few cycles
  int got;
  always @(posedge clk) begin
    ext_done <= 1'b0;
    if (ext_start) begin ext_busy <= 1'b1; got = 0; end
    if (nb_valid) begin
      got++;
      if (got == NB * NB) fork begin repeat (5) @(posedge clk); ext_done <= 1'b1; ext_busy <= 1'b0; end join_none
    end
  end

  // read data return
  always @(negedge clk) begin
    rd_valid = 0;
    if (lat_t.size() > 0 && lat_t[0] <= cyc) begin
      void'(lat_t.pop_front());
      rd_valid = 1; rd_data = lat_q.pop_front();
    end
    rd_ready = $urandom_range(0, 2) != 0;
  end

  // nb_data must be the integral value at the expected grid point
  int exp_data [$];
  always @(posedge clk) if (nb_valid) begin
    int e;
    e = exp_data.pop_front();
    `CHECK(int'(nb_data) == e, $sformatf("sample: %0d vs %0d", nb_data, e))
  end

  function automatic int val(int f, int a);
    return f * 100000 + a * 7 + 3;
  endfunction

  task automatic queue_point(int x, int y, int sc, bit bank);
    ip_t p;
    p = '0; p.x = 10'(x); p.y = 10'(y); p.scale = 2'(sc); p.bank = bank;
    ipq.push_back(p);
    for (int i = 0; i < NB; i++)
      for (int j = 0; j < NB; j++) begin
        int sx, sy;
        sx = x + (j - 13) * (sc + 2); sy = y + (i - 13) * (sc + 2);
        sx = sx < 0 ? 0 : (sx > W - 1 ? W - 1 : sx);
        sy = sy < 0 ? 0 : (sy > H - 1 ? H - 1 : sy);
        exp_addr.push_back(int'(bank) * (1 << 20) + sy * W + sx);
        exp_data.push_back(val(int'(bank), sy * W + sx));
      end
  endtask

  task automatic write_frame(int f);
    for (int a = 0; a < W * H; a++) begin
      ii_valid = 1; ii_addr = 20'(a); ii = IW'(val(f, a)); ii_frame_end = (a == W * H - 1);
      @(negedge clk);
      `CHECK(wr_en && wr_addr == {1'(f), 20'(a)} && wr_data == IW'(val(f, a)), $sformatf("write %0d", a))
    end
    ii_valid = 0; ii_frame_end = 0;
  endtask

  initial begin
    repeat (2) @(negedge clk); rst = 0;
    @(negedge clk);
    // a point of frame 0 queued while frame 0 is being written must wait
    queue_point(20, 15, 0, 1'b0);
    ii_valid = 1; ii_addr = 0; ii = IW'(val(0, 0));
    repeat (20) begin
      @(negedge clk);
      `CHECK(!rd_req && ipq.size() == 1, "point waits for its frame")
    end
    write_frame(0);
    `CHECK(wr_bank == 1'b1, "bank swapped")
    queue_point(2, 3, 3, 1'b0);       // clamped at the top-left corner
    queue_point(38, 28, 1, 1'b0);     // clamped at the bottom-right corner
    ipq.push_back(ip_t'({1'b1, 1'b0, 2'd0, 10'd0, 10'd0}));
    queue_point(17, 9, 2, 1'b0);
    ipq.push_back(ip_t'({1'b1, 1'b0, 2'd0, 10'd0, 10'd0}));
    while (ipq.size() > 0 || ext_busy) @(negedge clk);
    repeat (10) @(negedge clk);
    `CHECK(npts == 4 && nmark == 2, $sformatf("points %0d markers %0d", npts, nmark))
    `CHECK(nreq == 4 * NB * NB && nsamp == 4 * NB * NB, $sformatf("requests %0d samples %0d", nreq, nsamp))
    `CHECK(nstall > 0, "read stalls happened")
    `TB_FINISH
  end
endmodule
