// is_extreme: finds interest point candidates, the local maxima of the
// Hessian determinant over space and scale, and computes the first and
// second derivatives that the interpolation step needs.
//
// Octave 0 uses layers 9,15,21,27 sampled every 2 pixels, octave 1 uses
// layers 15,27,39,51 sampled every 4 pixels; the middle layers of each
// octave (15,21 and 27,39, scale index 0..3 for s = 2..5) are searched.
// For every layer a 3-row circular buffer of the sampled grid is kept
// (W/2 or W/4 entries, the original design's "depth of 400 or 200"). When sample
// (i, j) of an octave arrives, the point (i-1, j-1) is tested: it is a
// candidate if its value exceeds THRESH and all 26 neighbours in the 3x3x3
// block. Derivatives are finite differences scaled to stay integer:
// d2 = 2*gradient, h4 = 4*Hessian. The threshold value, the scaling and
// the standard SURF difference stencils are this design's choices.
// At most one candidate per octave can occur per sample; an octave-1
// candidate that coincides with an octave-0 one waits one cycle (octave-0
// samples are at least two cycles apart, so the wait never overflows).
// Interface: responses from hessian_response; out: cand_valid with pixel
// position, scale index, d2[x,y,s] and h4[xx,yy,ss,xy,xs,ys].
// Timing: one cycle after the sample that completes the 3x3x3 block.
module is_extreme
  import surf_pkg::*;
#(
  parameter int W      = 800,
  parameter int THRESH = 400
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  h_valid,
  input  logic [9:0]            xc,
  input  logic [9:0]            yc,
  input  det_t                  det [NSIZE],
  output logic                  cand_valid,
  output logic [9:0]            cand_x,
  output logic [9:0]            cand_y,
  output logic [1:0]            cand_scale,
  output logic signed [HW+3:0]  cand_d2 [3],
  output logic signed [HW+3:0]  cand_h4 [6]
);
  localparam int DV = HW + 4;
  typedef logic signed [DV-1:0] dv_t;

  typedef struct packed {
    logic        valid;
    logic [9:0]  x;
    logic [9:0]  y;
    logic [1:0]  scale;
  } cpos_t;

  // layer of octave o, position p (0..3) -> size index
  function automatic int layer_of(int o, int p);
    if (o == 0) return p;
    case (p)
      0: return 1; 1: return 3; 2: return 4; default: return 5;
    endcase
  endfunction

  cpos_t   cp   [2];
  dv_t     cd2  [2][3];
  dv_t     ch4  [2][6];

  for (genvar o = 0; o < 2; o++) begin : g_oct
    localparam int S  = (o == 0) ? 2 : 4;
    localparam int NS = W / S;

    det_t rowbuf [4][3][NS];
    det_t win [4][3][3];   // [layer][dy][dx] around the tested point
    logic samp;
    int   si, sj;

    always_comb begin
      samp = h_valid && (int'(xc) % S == 0) && (int'(yc) % S == 0);
      si   = int'(yc) / S;
      sj   = int'(xc) / S;
      for (int p = 0; p < 4; p++)
        for (int dy = 0; dy < 3; dy++)
          for (int dx = 0; dx < 3; dx++) begin
            // row si-2+dy, column sj-2+dx; the newest sample is the input
            if (dy == 2 && dx == 2) win[p][dy][dx] = det[layer_of(o, p)];
            else if (sj - 2 + dx < 0 || si - 2 + dy < 0) win[p][dy][dx] = '0;
            else win[p][dy][dx] = rowbuf[p][(si - 2 + dy) % 3][sj - 2 + dx];
          end
    end

    always_ff @(posedge clk) begin
      if (samp)
        for (int p = 0; p < 4; p++) rowbuf[p][si % 3][sj] <= det[layer_of(o, p)];
    end

    // test both middle layers
    logic        hit  [2];
    always_comb begin
      cp[o]  = '0;
      for (int q = 0; q < 3; q++) cd2[o][q] = '0;
      for (int q = 0; q < 6; q++) ch4[o][q] = '0;
      for (int m = 1; m <= 2; m++) begin
        hit[m-1] = samp && si >= 2 && sj >= 2 && win[m][1][1] > det_t'(THRESH);
        for (int p = m - 1; p <= m + 1; p++)
          for (int dy = 0; dy < 3; dy++)
            for (int dx = 0; dx < 3; dx++)
              if (!(p == m && dy == 1 && dx == 1) && win[p][dy][dx] >= win[m][1][1])
                hit[m-1] = 1'b0;
      end
      for (int m = 1; m <= 2; m++) begin
        if (hit[m-1]) begin
          cp[o].valid = 1'b1;
          cp[o].x     = 10'((sj - 1) * S);
          cp[o].y     = 10'((si - 1) * S);
          cp[o].scale = 2'(o * 2 + m - 1);
          cd2[o][0] = dv_t'(win[m][1][2]) - dv_t'(win[m][1][0]);
          cd2[o][1] = dv_t'(win[m][2][1]) - dv_t'(win[m][0][1]);
          cd2[o][2] = dv_t'(win[m+1][1][1]) - dv_t'(win[m-1][1][1]);
          ch4[o][0] = 4 * (dv_t'(win[m][1][2]) + dv_t'(win[m][1][0]) - 2 * dv_t'(win[m][1][1]));
          ch4[o][1] = 4 * (dv_t'(win[m][2][1]) + dv_t'(win[m][0][1]) - 2 * dv_t'(win[m][1][1]));
          ch4[o][2] = 4 * (dv_t'(win[m+1][1][1]) + dv_t'(win[m-1][1][1]) - 2 * dv_t'(win[m][1][1]));
          ch4[o][3] = dv_t'(win[m][2][2]) - dv_t'(win[m][2][0]) - dv_t'(win[m][0][2]) + dv_t'(win[m][0][0]);
          ch4[o][4] = dv_t'(win[m+1][1][2]) - dv_t'(win[m+1][1][0]) - dv_t'(win[m-1][1][2]) + dv_t'(win[m-1][1][0]);
          ch4[o][5] = dv_t'(win[m+1][2][1]) - dv_t'(win[m+1][0][1]) - dv_t'(win[m-1][2][1]) + dv_t'(win[m-1][0][1]);
        end
      end
    end
  end

  // octave-1 candidate held while an octave-0 candidate is issued
  cpos_t pend;
  dv_t   pend_d2 [3];
  dv_t   pend_h4 [6];

  always_ff @(posedge clk) begin
    if (rst) begin
      cand_valid <= 1'b0; pend <= '0;
      cand_x <= '0; cand_y <= '0; cand_scale <= '0;
      for (int q = 0; q < 3; q++) begin cand_d2[q] <= '0; pend_d2[q] <= '0; end
      for (int q = 0; q < 6; q++) begin cand_h4[q] <= '0; pend_h4[q] <= '0; end
    end else begin
      cand_valid <= 1'b0;
      if (cp[0].valid) begin
        cand_valid <= 1'b1; cand_x <= cp[0].x; cand_y <= cp[0].y; cand_scale <= cp[0].scale;
        cand_d2 <= cd2[0]; cand_h4 <= ch4[0];
        if (cp[1].valid) begin
          pend <= cp[1]; pend_d2 <= cd2[1]; pend_h4 <= ch4[1];
        end
      end else if (pend.valid) begin
        cand_valid <= 1'b1; cand_x <= pend.x; cand_y <= pend.y; cand_scale <= pend.scale;
        cand_d2 <= pend_d2; cand_h4 <= pend_h4;
        pend.valid <= 1'b0;
        if (cp[1].valid) begin
          pend <= cp[1]; pend_d2 <= cd2[1]; pend_h4 <= ch4[1];
        end
      end else if (cp[1].valid) begin
        cand_valid <= 1'b1; cand_x <= cp[1].x; cand_y <= cp[1].y; cand_scale <= cp[1].scale;
        cand_d2 <= cd2[1]; cand_h4 <= ch4[1];
      end
    end
  end
endmodule
