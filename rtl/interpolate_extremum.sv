// interpolate_extremum: accepts or rejects an interest point candidate by
// the quadratic interpolation test of SURF. The offset of the true extremum
// is O = -H^-1 * D with H the 3x3 Hessian over (x, y, scale) and D the
// gradient; the candidate is kept when every |O_i| < 0.5.
//
// The inputs are scaled integers, d2 = 2*D and h4 = 4*H, so
// O = -2 * adj(h4) * d2 / det(h4), and |O_i| < 0.5 is equivalent to
// 4*|(adj(h4)*d2)_i| < |det(h4)| with det(h4) != 0. The original design computes
// the offset with a divider; this design compares instead, which gives the
// same accept/reject decision without one. The sub-sample offset itself is
// not passed on: the descriptor is built at the integer sample position.
// Timing: two register stages (adjugate and determinant, then the test);
// one candidate per cycle. Interface: candidate in, ip_valid out with
// position and scale index.
module interpolate_extremum
  import surf_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  cand_valid,
  input  logic [9:0]            cand_x,
  input  logic [9:0]            cand_y,
  input  logic [1:0]            cand_scale,
  input  logic signed [HW+3:0]  cand_d2 [3],
  input  logic signed [HW+3:0]  cand_h4 [6],  // xx, yy, ss, xy, xs, ys
  output logic                  ip_valid,
  output logic [9:0]            ip_x,
  output logic [9:0]            ip_y,
  output logic [1:0]            ip_scale
);
  typedef logic signed [127:0] w_t;

  // full symmetric matrix
  w_t m [3][3];
  always_comb begin
    m[0][0] = w_t'(cand_h4[0]); m[1][1] = w_t'(cand_h4[1]); m[2][2] = w_t'(cand_h4[2]);
    m[0][1] = w_t'(cand_h4[3]); m[1][0] = w_t'(cand_h4[3]);
    m[0][2] = w_t'(cand_h4[4]); m[2][0] = w_t'(cand_h4[4]);
    m[1][2] = w_t'(cand_h4[5]); m[2][1] = w_t'(cand_h4[5]);
  end

  // stage 1: adjugate times gradient, and determinant
  w_t   adj [3][3];
  w_t   ad_c [3];
  w_t   det_c;
  always_comb begin
    for (int i = 0; i < 3; i++)
      for (int j = 0; j < 3; j++)
        // adj[i][j] = cofactor[j][i]
        adj[i][j] = m[(j+1)%3][(i+1)%3] * m[(j+2)%3][(i+2)%3]
                  - m[(j+1)%3][(i+2)%3] * m[(j+2)%3][(i+1)%3];
    for (int i = 0; i < 3; i++)
      ad_c[i] = adj[i][0] * w_t'(cand_d2[0]) + adj[i][1] * w_t'(cand_d2[1])
              + adj[i][2] * w_t'(cand_d2[2]);
    det_c = m[0][0] * adj[0][0] + m[0][1] * adj[1][0] + m[0][2] * adj[2][0];
  end

  logic       v1;
  logic [9:0] x1, y1;
  logic [1:0] s1;
  w_t         ad1 [3];
  w_t         det1;

  function automatic w_t absw(w_t v);
    return (v < 0) ? -v : v;
  endfunction

  logic ok;
  always_comb begin
    ok = (det1 != 0);
    for (int i = 0; i < 3; i++)
      if ((absw(ad1[i]) <<< 2) >= absw(det1)) ok = 1'b0;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      v1 <= 1'b0; x1 <= '0; y1 <= '0; s1 <= '0; det1 <= '0;
      for (int i = 0; i < 3; i++) ad1[i] <= '0;
      ip_valid <= 1'b0; ip_x <= '0; ip_y <= '0; ip_scale <= '0;
    end else begin
      v1 <= cand_valid; x1 <= cand_x; y1 <= cand_y; s1 <= cand_scale;
      ad1 <= ad_c; det1 <= det_c;
      ip_valid <= v1 && ok;
      ip_x <= x1; ip_y <= y1; ip_scale <= s1;
    end
  end
endmodule
