// tb_integral_image_gen: sends an RGB frame whose three channels are
// equal (so the gray value is known exactly) with sync signals and
// blanking, and checks each integral pixel, its position and address, the
// two-cycle latency and the frame_end pulse.
`timescale 1ns/1ps
`include "tb_util.svh"
module tb_integral_image_gen;
  localparam int W = 12, H = 6;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic [23:0] rgb = 0;
  logic vsync = 0, hsync = 0, de = 0;
  logic iv, ife;
  logic [27:0] ii;
  logic [9:0] ic, ir;
  logic [19:0] ia;
  integral_image_gen #(.W(W), .H(H)) dut (.clk, .rst, .rgb, .vsync, .hsync, .de,
    .ii_valid(iv), .ii, .ii_col(ic), .ii_row(ir), .ii_addr(ia), .ii_frame_end(ife));
  `WATCHDOG(10000)
  int img [H][W];
  int n_out = 0, n_fe = 0;
  int t_in [$];
  int cyc = 0;
  always @(posedge clk) cyc++;
  // checker
  always @(posedge clk) begin
    #1;
    if (iv) begin
      int e, r, c, t0;
      r = n_out / W; c = n_out % W;
      e = 0;
      for (int y = 0; y <= r; y++) for (int x = 0; x <= c; x++) e += img[y][x];
      t0 = t_in.pop_front();
      `CHECK(ii == 28'(e) && ic == c && ir == r && ia == r * W + c,
             $sformatf("(%0d,%0d) ii %0d exp %0d", c, r, ii, e))
      `CHECK(cyc - t0 == 2, $sformatf("latency %0d", cyc - t0))
      if (ife) n_fe++;
      `CHECK(ife == (n_out == W * H - 1), "frame_end")
      n_out++;
    end
  end
  initial begin
    foreach (img[r, c]) img[r][c] = int'($urandom_range(0, 255));
    repeat (2) @(posedge clk); #1; rst = 0;
    vsync = 1; repeat (2) @(posedge clk); #1; vsync = 0; @(posedge clk); #1;
    for (int r = 0; r < H; r++) begin
      hsync = 1; @(posedge clk); #1; hsync = 0; @(posedge clk); #1;
      for (int c = 0; c < W; c++) begin
        de = 1; rgb = {3{8'(img[r][c])}};
        t_in.push_back(cyc);  // cycle in which the pixel is presented
        @(posedge clk); #1;
      end
      de = 0;
      repeat (3) @(posedge clk); #1;
    end
    repeat (5) @(posedge clk); #1;
    `CHECK(n_out == W * H && n_fe == 1, $sformatf("outputs %0d", n_out))
    `TB_FINISH
  end
endmodule
