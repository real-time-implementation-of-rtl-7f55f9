// tb_diff_tracker: a 16x8 video stream with blanking, four frames. A
// bright square moves over a textured background; the output must be the
// input delayed 4 cycles, with the pixels whose gray value changed by at
// least 30 from the previous frame at the same position shown as FF0000
// and all others as their gray value. Frame 0 is compared with the
// (zero) unwritten half and frame 1 with the other unwritten half.
`timescale 1ns/1ps
`include "tb_util.svh"
module tb_diff_tracker;
  localparam int W = 16, H = 8;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic [23:0] rgb = 0, out_rgb;
  logic vsync = 0, hsync = 0, de = 0, ov, oh, od, moving;
  diff_tracker #(.W(W), .H(H), .THRESH(30)) dut (.clk, .rst, .rgb, .vsync, .hsync, .de,
    .out_rgb, .out_vsync(ov), .out_hsync(oh), .out_de(od), .moving);
  `WATCHDOG(20000)
  function automatic int gray(logic [23:0] c);
    return (19588 * int'(c[23:16]) + 38470 * int'(c[15:8]) + 7471 * int'(c[7:0]) + 32768) >>> 16;
  endfunction
  function automatic logic [23:0] pix(int f, int x, int y);
    if (x >= 2 + 3 * f && x < 6 + 3 * f && y >= 2 && y < 6) return 24'hF0F0F0;
    return {8'(40 + 5 * x), 8'(30 + 7 * y), 8'(20 + x + y)};
  endfunction
  // expected output stream: {de, vsync, hsync, rgb, moving} per input cycle
  logic [27:0] exp_q [$];
  int g [2][W * H];
  int cyc = 0, nmove = 0, frame = 0;
  task automatic drive(bit v, bit h, bit d, logic [23:0] c, bit mv, logic [23:0] oc);
    vsync = v; hsync = h; de = d; rgb = c;
    exp_q.push_back({d, v, h, d ? oc : 24'(0), d ? mv : 1'b0});
    @(negedge clk);
  endtask
  always @(posedge clk) begin
    #1;
    cyc++;
    if (exp_q.size() > 3) begin
      logic [27:0] e;
      e = exp_q.pop_front();
      `CHECK(od == e[27] && ov == e[26] && oh == e[25], $sformatf("sync at cycle %0d: %b%b%b vs %b", cyc, od, ov, oh, e[27:25]))
      if (e[27]) begin
        `CHECK(out_rgb == e[24:1] && moving == e[0],
               $sformatf("pixel cycle %0d: %h/%0b vs %h/%0b", cyc, out_rgb, moving, e[24:1], e[0]))
        if (moving) nmove++;
      end
    end
  end
  initial begin
    foreach (g[b, a]) g[b][a] = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int i = 0; i < 4; i++) drive(0, 0, 0, 0, 0, 0);
    for (int f = 0; f < 4; f++) begin
      int b;
      b = f % 2;
      for (int i = 0; i < 3; i++) drive(1, 0, 0, 0, 0, 0);
      for (int i = 0; i < 3; i++) drive(0, 0, 0, 0, 0, 0);
      for (int y = 0; y < H; y++) begin
        for (int x = 0; x < W; x++) begin
          int gc, d;
          logic [23:0] c;
          c = pix(f, x, y); gc = gray(c);
          d = gc - g[1 - b][y * W + x];
          if (d < 0) d = -d;
          drive(0, 0, 1, c, d >= 30, (d >= 30) ? 24'hFF0000 : {8'(gc), 8'(gc), 8'(gc)});
          g[b][y * W + x] = gc;
        end
        for (int i = 0; i < 3; i++) drive(0, i == 1, 0, 0, 0, 0);
      end
    end
    for (int i = 0; i < 8; i++) drive(0, 0, 0, 0, 0, 0);
    $display("highlighted pixels: %0d", nmove);
    `CHECK(nmove > 0, "motion highlighted")
    `TB_FINISH
  end
endmodule
