// tb_video_pos_gen: sends two small frames with horizontal and vertical
// blanking and checks column, row, address and the frame_end pulse of
// every valid pixel, one cycle after it.
`timescale 1ns/1ps
`include "tb_util.svh"
module tb_video_pos_gen;
  localparam int W = 8, H = 4;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic vsync = 0, hsync = 0, de = 0;
  logic valid, fs, fe;
  logic [9:0] col, row;
  logic [19:0] addr;
  video_pos_gen #(.W(W), .H(H)) dut (.clk, .rst, .vsync, .hsync, .de,
    .valid, .col, .row, .addr, .frame_start(fs), .frame_end(fe));
  `WATCHDOG(5000)
  int ex_c, ex_r, nfe;
  initial begin
    nfe = 0;
    repeat (3) @(posedge clk); #1;
    rst = 0;
    for (int f = 0; f < 2; f++) begin
      vsync = 1; repeat (3) @(posedge clk); #1; vsync = 0; repeat (2) @(posedge clk); #1;
      for (int r = 0; r < H; r++) begin
        hsync = 1; repeat (2) @(posedge clk); #1; hsync = 0; @(posedge clk); #1;
        for (int c = 0; c < W; c++) begin
          de = 1; @(posedge clk); #1;
          // the registered outputs now describe this pixel
          de = 0;
          ex_c = c; ex_r = r;
          `CHECK(valid && col == ex_c && row == ex_r && addr == ex_r * W + ex_c,
                 $sformatf("pixel %0d,%0d got v%0d %0d,%0d a%0d", c, r, valid, col, row, addr))
          `CHECK(fe == (c == W - 1 && r == H - 1), "frame_end")
          `CHECK(fs == (c == 0 && r == 0), "frame_start")
          if (fe) nfe++;
        end
        repeat (3) @(posedge clk); #1;
      end
    end
    `CHECK(nfe == 2, "two frame ends")
    `TB_FINISH
  end
endmodule
