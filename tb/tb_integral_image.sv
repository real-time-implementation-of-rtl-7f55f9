// tb_integral_image: streams two random gray frames (with gaps between
// lines) and compares every integral pixel with a sum of the pixels at or
// above and left of it, computed directly in the testbench.
`timescale 1ns/1ps
`include "tb_util.svh"
module tb_integral_image;
  localparam int W = 16, H = 10;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic valid = 0;
  logic [7:0] gray;
  logic [9:0] col, row;
  logic ii_valid;
  logic [27:0] ii;
  logic [9:0] ic, ir;
  integral_image #(.W(W)) dut (.clk, .rst, .valid, .gray, .col, .row,
    .ii_valid, .ii, .ii_col(ic), .ii_row(ir));
  `WATCHDOG(10000)
  int img [H][W];
  initial begin
    repeat (2) @(posedge clk); #1; rst = 0;
    for (int f = 0; f < 2; f++) begin
      foreach (img[r, c]) img[r][c] = (f == 0 && r == 0 && c == 0) ? 255 : int'($urandom_range(0, 255));
      for (int r = 0; r < H; r++) begin
        for (int c = 0; c < W; c++) begin
          int e;
          valid = 1; gray = 8'(img[r][c]); col = 10'(c); row = 10'(r);
          @(posedge clk); #1;
          valid = 0;
          e = 0;
          for (int y = 0; y <= r; y++) for (int x = 0; x <= c; x++) e += img[y][x];
          `CHECK(ii_valid && ii == 28'(e) && ic == c && ir == r,
                 $sformatf("(%0d,%0d) ii %0d expect %0d", c, r, ii, e))
          if (c % 5 == 4) begin @(posedge clk); #1; end  // gap
        end
        repeat (2) @(posedge clk); #1;
      end
    end
    `TB_FINISH
  end
endmodule
