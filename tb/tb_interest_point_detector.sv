// tb_interest_point_detector: streams the integral image of a 96x96 frame
// holding two bright discs of different radius on a dark background and
// checks that interest points are found on both discs (within 4 pixels of
// the centre), that the larger disc is found at a larger scale, and that
// no point is reported more than 20 pixels from both discs (side lobes of
// the box filters around a disc are genuine responses).
`timescale 1ns/1ps
`include "tb_util.svh"
module tb_interest_point_detector;
  import surf_pkg::*;
  localparam int W = 96, H = 96;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic ii_valid = 0;
  logic [IW-1:0] ii;
  logic [9:0] col, row;
  logic pv, cseen, covf; logic [9:0] px, py; logic [1:0] ps;
  interest_point_detector #(.W(W), .THRESH(400)) dut (.clk, .rst, .ii_valid, .ii, .ii_col(col), .ii_row(row),
    .ip_valid(pv), .ip_x(px), .ip_y(py), .ip_scale(ps), .cand_seen(cseen), .cand_overflow(covf));
  `WATCHDOG(40000)
  int img [H][W];
  longint integ [H][W];
  int n_small = 0, n_big = 0, n_other = 0, s_small = 9, s_big = 0, ncand = 0;
  localparam int AX = 34, AY = 36, AR = 4;   // small disc
  localparam int BX = 60, BY = 56, BR = 8;   // large disc
  always @(posedge clk) begin
    #1;
    if (cseen) ncand++;
    if (pv) begin
      int dxa, dya, dxb, dyb;
      dxa = int'(px) - AX; dya = int'(py) - AY; dxb = int'(px) - BX; dyb = int'(py) - BY;
      $display("interest point x=%0d y=%0d scale=%0d", px, py, ps);
      if (dxa * dxa + dya * dya <= 16) begin n_small++; if (ps < s_small) s_small = ps; end
      else if (dxb * dxb + dyb * dyb <= 16) begin n_big++; if (ps > s_big) s_big = ps; end
      else if (dxa * dxa + dya * dya > 400 && dxb * dxb + dyb * dyb > 400) n_other++;
    end
  end
  initial begin
    foreach (img[r, c]) begin
      int da, db;
      da = (c - AX) * (c - AX) + (r - AY) * (r - AY);
      db = (c - BX) * (c - BX) + (r - BY) * (r - BY);
      img[r][c] = (da <= AR * AR || db <= BR * BR) ? 220 : 20;
    end
    foreach (integ[r, c])
      integ[r][c] = img[r][c] + (r > 0 ? integ[r-1][c] : 0) + (c > 0 ? integ[r][c-1] : 0)
                  - (r > 0 && c > 0 ? integ[r-1][c-1] : 0);
    repeat (2) @(negedge clk); rst = 0;
    for (int r = 0; r < H; r++) begin
      for (int c = 0; c < W; c++) begin
        ii_valid = 1; col = 10'(c); row = 10'(r); ii = IW'(integ[r][c]);
        @(negedge clk);
      end
      ii_valid = 0;
      repeat (4) @(negedge clk);
    end
    repeat (10) @(negedge clk);
    $display("candidates %0d, small disc %0d (min scale %0d), large disc %0d (max scale %0d), other %0d",
             ncand, n_small, s_small, n_big, s_big, n_other);
    `CHECK(n_small > 0, "small disc found")
    `CHECK(n_big > 0, "large disc found")
    `CHECK(s_big > s_small, "large disc at larger scale")
    `CHECK(n_other == 0, "no point away from the discs")
    `TB_FINISH
  end
endmodule
