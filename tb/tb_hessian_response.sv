// tb_hessian_response: streams the integral image of a random 64x64 frame
// and compares the six determinants at a grid of points with a model that
// sums the filter boxes pixel by pixel and evaluates
// Det = Dxx/L^2 * Dyy/L^2 - 0.81 * (Dxy/L^2)^2 (scaled by 2^16) in real
// arithmetic, within the fixed-point rounding bound. Also checks the point
// positions and that every point of the valid range is reported once.
`timescale 1ns/1ps
`include "tb_util.svh"
module tb_hessian_response;
  import surf_pkg::*;
  localparam int W = 64, H = 64;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic ii_valid = 0;
  logic [IW-1:0] ii;
  logic [9:0] col, row;
  logic h_valid;
  logic [9:0] xc, yc;
  det_t det [NSIZE];
  hessian_response #(.W(W)) dut (.clk, .rst, .ii_valid, .ii, .ii_col(col), .ii_row(row),
    .h_valid, .xc, .yc, .det);
  `WATCHDOG(20000)

  int img [H][W];
  longint got [H][W][NSIZE];
  bit     seen [H][W];
  int     nseen = 0;

  function automatic longint psum(int r1, int c1, int r2, int c2);
    longint s = 0;
    for (int r = r1; r <= r2; r++) for (int c = c1; c <= c2; c++) s += img[r][c];
    return s;
  endfunction

  always @(posedge clk) begin
    #1;
    if (h_valid) begin
      `CHECK(!seen[yc][xc], "point reported twice")
      seen[yc][xc] = 1; nseen++;
      for (int k = 0; k < NSIZE; k++) got[yc][xc][k] = longint'(det[k]);
    end
  end

  initial begin
    foreach (img[r, c]) img[r][c] = int'($urandom_range(0, 255));
    foreach (seen[r, c]) seen[r][c] = 0;
    repeat (2) @(posedge clk); #1; rst = 0;
    for (int r = 0; r < H; r++) begin
      for (int c = 0; c < W; c++) begin
        ii_valid = 1; col = 10'(c); row = 10'(r); ii = IW'(psum(0, 0, r, c));
        @(posedge clk); #1;
      end
      ii_valid = 0;
      repeat (2) @(posedge clk); #1;
    end
    repeat (3) @(posedge clk); #1;
    `CHECK(nseen == (W - 26) * (H - 26), $sformatf("points %0d", nseen))
    for (int yy = 0; yy < H - 26; yy += 3)
      for (int xx = 0; xx < W - 26; xx += 3)
        for (int k = 0; k < NSIZE; k++) begin
          int L, l, b, hl;
          real dxx, dyy, dxy, e, tol;
          L = filt_len(k); l = L / 3; b = (L - 1) / 2; hl = (l - 1) / 2;
          if (xx < b || yy < b) begin
            `CHECK(got[yy][xx][k] == 0, "outside filter range must be 0")
          end else begin
            dyy = real'(psum(yy - b, xx - l + 1, yy + b, xx + l - 1) - 3 * psum(yy - hl, xx - l + 1, yy + hl, xx + l - 1));
            dxx = real'(psum(yy - l + 1, xx - b, yy + l - 1, xx + b) - 3 * psum(yy - l + 1, xx - hl, yy + l - 1, xx + hl));
            dxy = real'(psum(yy - l, xx - l, yy - 1, xx - 1) + psum(yy + 1, xx + 1, yy + l, xx + l)
                      - psum(yy - l, xx + 1, yy - 1, xx + l) - psum(yy + 1, xx - l, yy + l, xx - 1));
            dxx = dxx * 256.0 / (L * L); dyy = dyy * 256.0 / (L * L); dxy = dxy * 256.0 / (L * L);
            e = dxx * dyy - 0.81 * dxy * dxy;
            tol = 2.0 * ((dxx < 0 ? -dxx : dxx) + (dyy < 0 ? -dyy : dyy) + 2.0 * (dxy < 0 ? -dxy : dxy))
                + 2e-3 * (e < 0 ? -e : e) + 8.0;
            `CHECK(real'(got[yy][xx][k]) >= e - tol && real'(got[yy][xx][k]) <= e + tol,
                   $sformatf("(%0d,%0d) L=%0d det %0d expect %f", xx, yy, L, got[yy][xx][k], e))
          end
        end
    `TB_FINISH
  end
endmodule
