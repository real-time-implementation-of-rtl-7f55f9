// tb_top_body.svh: body shared by the end-to-end testbenches of
// video_detect_top. The including module defines W, H (the frame size),
// NFR (frames to send) and instantiates the top as dut with the signals
// declared here. Both detectors see the same video: a dark background with
// a grid of bright discs that moves 4 pixels per frame.
//
// Checked: every integral value written to the frame memory (against a
// model of the gray conversion and the running sums), the sum behind every
// frame decision (recomputed from the descriptors that reached the matcher
// and the library formula, 30 smallest per-library minima), one decision
// per frame, and the motion detector's output pixels and syncs four cycles
// after its input (pixels from the second frame on: the first is compared
// with a buffer half that was never written). Counted, each failing the test if it never happens:
// interest points, descriptors, frame decisions, memory read stalls,
// descriptor FIFO full, interest point FIFO drops, highlighted pixels.
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic [23:0] rgb = 0;
  logic vsync = 0, hsync = 0, de = 0;
  logic ddr_wr_en, ddr_rd_req, ddr_rd_ready = 0, ddr_rd_valid = 0;
  logic [20:0] ddr_wr_addr, ddr_rd_addr;
  logic [IW-1:0] ddr_wr_data, ddr_rd_data = 0;
  logic det_valid, detected;
  logic [63:0] det_sum;
  logic [15:0] ip_count, ip_dropped, desc_count;
  logic [23:0] d_out_rgb;
  logic d_out_vsync, d_out_hsync, d_out_de, d_moving;

  // ---------------- stimulus model ----------------
  function automatic logic [23:0] pix(int f, int x, int y);
    int dx, dy;
    dx = (x + 4 * f) % 12 - 6; dy = y % 12 - 6;
    if (dx * dx + dy * dy <= 16) return 24'hE0E0E0;
    return {8'(20 + (x % 7)), 8'(24), 8'(16 + (y % 5))};
  endfunction
  function automatic int gray(logic [23:0] c);
    return (19588 * int'(c[23:16]) + 38470 * int'(c[15:8]) + 7471 * int'(c[7:0]) + 32768) >>> 16;
  endfunction

  // ---------------- memory model ----------------
  logic [IW-1:0] mem [int];
  logic [IW-1:0] rq [$];
  longint rt [$];
  longint cyc = 0;
  int n_rd_stall = 0, n_dff_full = 0, n_wr = 0;
  longint integ [2][H][W];
  always @(posedge clk) begin
    cyc++;
    if (ddr_wr_en && !rst) begin
      int a, r, c, b;
      a = int'(ddr_wr_addr[19:0]); r = a / W; c = a % W; b = int'(ddr_wr_addr[20]);
      mem[int'(ddr_wr_addr)] = ddr_wr_data;
      `CHECK(longint'(ddr_wr_data) == integ[b][r][c], $sformatf("integral (%0d,%0d) bank %0d: %0d vs %0d", c, r, b, ddr_wr_data, integ[b][r][c]))
      n_wr++;
    end
    if (ddr_rd_req && ddr_rd_ready) begin
      rq.push_back(mem.exists(int'(ddr_rd_addr)) ? mem[int'(ddr_rd_addr)] : '0);
      rt.push_back(cyc + 4);
    end
    if (ddr_rd_req && !ddr_rd_ready) n_rd_stall++;
    if (dut.u_surf.dff_full) n_dff_full++;
  end
  always @(negedge clk) begin
    ddr_rd_valid = 0;
    if (rt.size() > 0 && rt[0] <= cyc) begin
      void'(rt.pop_front());
      ddr_rd_valid = 1; ddr_rd_data = rq.pop_front();
    end
    ddr_rd_ready = $urandom_range(0, 3) != 0;
  end

  // ---------------- matcher model ----------------
  function automatic longint lv(int d, int e);
    longint h;
    h = (longint'(d * 64 + e + 1) * 64'd2654435761) & 64'hFFFF_FFFF;
    return ((h >> 8) - 8388608) * 4;
  endfunction
  longint lib [128][64];
  longint mind [128];
  int n_dec = 0, n_desc_m = 0, n_det = 0;
  longint exp_sum [$];
  always @(posedge clk) begin
    if (!rst && dut.u_surf.u_match.in_valid && dut.u_surf.u_match.in_ready) begin
      if (dut.u_surf.u_match.in_marker) begin
        automatic longint m [$];
        automatic longint sum;
        foreach (mind[d]) m.push_back(mind[d]);
        m.sort();
        sum = 0;
        for (int i = 0; i < 30; i++) sum += m[i];
        exp_sum.push_back(sum);
        foreach (mind[d]) mind[d] = 64'h00FF_FFFF_FFFF_FFFF;
      end else begin
        for (int d = 0; d < 128; d++) begin
          longint s;
          s = 0;
          for (int e = 0; e < 64; e++) begin
            longint v;
            v = longint'(dut.u_surf.u_match.in_desc[e]);
            s += (v > lib[d][e]) ? v - lib[d][e] : lib[d][e] - v;
          end
          if (s < mind[d]) mind[d] = s;
        end
        n_desc_m++;
      end
    end
    if (det_valid && !rst) begin
      n_dec++; if (detected) n_det++;
      if (exp_sum.size() > 0) begin
        automatic longint es = exp_sum.pop_front();
        `CHECK(det_sum == 64'(es), $sformatf("decision sum %0d vs %0d", det_sum, es))
        `CHECK(detected == (es < 64'd8053063680), "decision")
      end else `CHECK(0, "decision without a marker")
      $display("decision %0d at cycle %0d: sum %0d, %0d descriptors so far", n_dec, cyc, det_sum, desc_count);
    end
  end

  // ---------------- motion detector model ----------------
  logic [28:0] dq [$];   // {check, de, vsync, hsync, rgb, moving}
  int gprev [2][H][W];
  int n_move = 0;
  always @(posedge clk) begin
    #1;
    if (MOTION && dq.size() > 3) begin
      logic [28:0] e;
      e = dq.pop_front();
      if (e[28]) begin
      `CHECK(d_out_de == e[27] && d_out_vsync == e[26] && d_out_hsync == e[25], "motion output syncs")
      if (e[27]) begin
        `CHECK(d_out_rgb == e[24:1] && d_moving == e[0], $sformatf("motion pixel %h/%0b vs %h/%0b", d_out_rgb, d_moving, e[24:1], e[0]))
        if (d_moving) n_move++;
      end
      end
    end
  end

  // ---------------- video driver ----------------
  bit chk = 1'b1;
  task automatic cyc_out(bit v, bit h, bit d, logic [23:0] c, bit mv, logic [23:0] oc);
    vsync = v; hsync = h; de = d; rgb = c;
    dq.push_back({chk || !d, d, v, h, d ? oc : 24'(0), d ? mv : 1'b0});
    @(negedge clk);
  endtask
  task automatic send_frame(int f);
    int b;
    b = f % 2;
    chk = f > 0;   // frame 0 is compared with the unwritten half
    for (int i = 0; i < 2; i++) cyc_out(1, 0, 0, 0, 0, 0);
    for (int i = 0; i < 4; i++) cyc_out(0, 0, 0, 0, 0, 0);
    for (int y = 0; y < H; y++) begin
      longint rs;
      rs = 0;
      for (int x = 0; x < W; x++) begin
        logic [23:0] c;
        int g, dd;
        c = pix(f, x, y); g = gray(c);
        rs += g;
        integ[b][y][x] = rs + ((y > 0) ? integ[b][y-1][x] : 0);
        dd = g - gprev[1 - b][y][x]; if (dd < 0) dd = -dd;
        cyc_out(0, 0, 1, c, dd >= 30, (dd >= 30) ? 24'hFF0000 : {8'(g), 8'(g), 8'(g)});
        gprev[b][y][x] = g;
      end
      for (int i = 0; i < 6; i++) cyc_out(0, i == 2, 0, 0, 0, 0);
    end
  endtask

  initial begin
    foreach (lib[d, e]) lib[d][e] = lv(d, e);
    foreach (mind[d]) mind[d] = 64'h00FF_FFFF_FFFF_FFFF;
    foreach (gprev[b, y, x]) gprev[b][y][x] = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int f = 0; f < NFR; f++) begin
      send_frame(f);
      $display("frame %0d sent at cycle %0d: %0d points so far", f, cyc, ip_count);
      // a frame's points are read from its memory bank, which the frame
      // after next overwrites: wait for the decision before going on
      while (n_dec < f + 1) begin
      cyc_out(0, 0, 0, 0, 0, 0);
        if (cyc % 200000 == 0) $display("cycle %0d: points %0d dropped %0d descriptors %0d decisions %0d", cyc, ip_count, ip_dropped, desc_count, n_dec);
      end
    end
    repeat (10) cyc_out(0, 0, 0, 0, 0, 0);
    $display("points %0d (dropped %0d), descriptors %0d, decisions %0d (detected %0d), read stalls %0d, descriptor FIFO full %0d cycles, highlighted pixels %0d, cycles %0d",
             ip_count, ip_dropped, desc_count, n_dec, n_det, n_rd_stall, n_dff_full, n_move, cyc);
    `CHECK(n_wr == NFR * W * H, $sformatf("integral writes %0d", n_wr))
    `CHECK(ip_count > 0, "interest points found")
    `CHECK(int'(desc_count) == n_desc_m && desc_count > 0, "descriptors matched")
    `CHECK(int'(desc_count) == int'(ip_count) - int'(ip_dropped), "every kept point described")
    `CHECK(n_dec == NFR, "one decision per frame")
    `CHECK(n_rd_stall > 0, "memory read stalls happened")
    `CHECK(n_dff_full > 0, "descriptor FIFO filled up")
    `CHECK(ip_dropped > 0, "interest point FIFO overflow happened")
    if (MOTION) `CHECK(n_move > 0, "motion highlighted")
    `TB_FINISH
  end
