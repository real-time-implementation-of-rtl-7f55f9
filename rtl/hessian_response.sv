// hessian_response: the Build_Hessian_Response stage of the interest point
// detector. It keeps the most recent NLINES lines of the integral image and,
// for every arriving integral pixel, evaluates the approximated Hessian
// determinant Det = Dxx*Dyy - (0.9*Dxy)^2 at six box-filter sizes
// (9, 15, 21, 27, 39, 51) around the point 26 rows and 26 columns behind it.
//
// Each size needs 32 integral samples: 8 for Dxx (outer box minus three
// times the middle lobe), 8 for Dyy and 16 for Dxy (four l x l boxes), with
// lobe l = L/3 as in standard SURF. Responses are normalised by the filter
// area (multiply by round(2^20/L^2), shift right 12: 8 fractional bits) and
// 0.81 is applied as 207/256; the result saturates to 36 bits. Points whose
// filter would leave the image get 0.
//
// The line buffer (56 lines of W entries), the two octaves, the six
// determinants and their 36-bit width follow the original design. The original design
// serialises the six sizes through one response unit at 100 MHz behind a
// clock-crossing FIFO; this design computes all six in parallel at the
// pixel clock, which gives the same results in a single clock domain.
// Interface: integral stream (ii, ii_col, ii_row, ii_valid) in raster order;
// out: h_valid with (xc, yc) and det[0..5]. Timing: one cycle after the
// input pixel (x, y) the responses of point (x-26, y-26) appear, for
// x >= 26 and y >= 26.
module hessian_response
  import surf_pkg::*;
#(
  parameter int W      = 800,
  parameter int NLINES = 56
) (
  input  logic           clk,
  input  logic           rst,
  input  logic           ii_valid,
  input  logic [IW-1:0]  ii,
  input  logic [9:0]     ii_col,
  input  logic [9:0]     ii_row,
  output logic           h_valid,
  output logic [9:0]     xc,
  output logic [9:0]     yc,
  output det_t           det [NSIZE]
);
  localparam int C = 26;  // (51+1)/2: offset of the evaluated point

  logic [IW-1:0] lb [NLINES][W];

  // integral value at (r, c) with index -1 meaning the zero border
  function automatic logic signed [IW+1:0] iat(int r, int c);
    if (r < 0 || c < 0) return '0;
    return {2'b00, lb[r % NLINES][c]};
  endfunction

  // sum of the pixels in rows r1..r2, columns c1..c2
  function automatic logic signed [IW+1:0] box(int r1, int c1, int r2, int c2);
    return iat(r2, c2) - iat(r1 - 1, c2) - iat(r2, c1 - 1) + iat(r1 - 1, c1 - 1);
  endfunction

  function automatic det_t sat_det(logic signed [79:0] v);
    if (v > 80'sd34359738367) return det_t'(36'sh7_FFFF_FFFF);
    if (v < -80'sd34359738368) return det_t'(36'sh8_0000_0000);
    return det_t'(v);
  endfunction

  int x_c, y_c;
  always_comb begin
    x_c = int'(ii_col) - C;
    y_c = int'(ii_row) - C;
  end

  det_t det_c [NSIZE];

  for (genvar k = 0; k < NSIZE; k++) begin : g_size
    localparam int L  = filt_len(k);
    localparam int B  = (L - 1) / 2;
    localparam int LB = L / 3;
    localparam int HL = (LB - 1) / 2;
    localparam logic signed [15:0] INV = 16'(filt_inv(k));

    logic signed [IW+3:0]  dxx, dyy, dxy;
    logic signed [47:0]    nxx, nyy, nxy;
    logic signed [79:0]    d;

    always_comb begin
      dxx = '0; dyy = '0; dxy = '0; d = '0;
      if (x_c >= B && y_c >= B) begin
        // vertical second derivative: lobes stacked along rows
        dyy = (IW+4)'(box(y_c - B, x_c - LB + 1, y_c + B, x_c + LB - 1))
            - 3 * (IW+4)'(box(y_c - HL, x_c - LB + 1, y_c + HL, x_c + LB - 1));
        // horizontal second derivative: lobes side by side along columns
        dxx = (IW+4)'(box(y_c - LB + 1, x_c - B, y_c + LB - 1, x_c + B))
            - 3 * (IW+4)'(box(y_c - LB + 1, x_c - HL, y_c + LB - 1, x_c + HL));
        dxy = (IW+4)'(box(y_c - LB, x_c - LB, y_c - 1, x_c - 1))
            + (IW+4)'(box(y_c + 1, x_c + 1, y_c + LB, x_c + LB))
            - (IW+4)'(box(y_c - LB, x_c + 1, y_c - 1, x_c + LB))
            - (IW+4)'(box(y_c + 1, x_c - LB, y_c + LB, x_c - 1));
      end
      nxx = (48'(dxx) * 48'(INV)) >>> 12;
      nyy = (48'(dyy) * 48'(INV)) >>> 12;
      nxy = (48'(dxy) * 48'(INV)) >>> 12;
      d   = 80'(nxx) * 80'(nyy) - ((80'sd207 * 80'(nxy) * 80'(nxy)) >>> 8);
      det_c[k] = sat_det(d);
    end
  end

  always_ff @(posedge clk) begin
    if (ii_valid) lb[int'(ii_row) % NLINES][ii_col] <= ii;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      h_valid <= 1'b0; xc <= '0; yc <= '0;
      for (int k = 0; k < NSIZE; k++) det[k] <= '0;
    end else begin
      h_valid <= ii_valid && x_c >= 0 && y_c >= 0;
      xc      <= 10'(x_c);
      yc      <= 10'(y_c);
      for (int k = 0; k < NSIZE; k++) det[k] <= det_c[k];
    end
  end
endmodule
