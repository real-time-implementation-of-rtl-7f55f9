// tb_interpolate_extremum: random candidates (gradient and symmetric
// Hessian) are sent back to back; the expected decision comes from solving
// O = -H^-1 D in real arithmetic by Cramer's rule and testing |O_i| < 0.5.
// Checks the decision, position and scale of each, the two-cycle latency,
// and that both accepted and rejected cases occurred.
`timescale 1ns/1ps
`include "tb_util.svh"
module tb_interpolate_extremum;
  import surf_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic cv = 0; logic [9:0] cx, cy; logic [1:0] cs;
  logic signed [HW+3:0] d2 [3];
  logic signed [HW+3:0] h4 [6];
  logic iv; logic [9:0] ix, iy; logic [1:0] is;
  interpolate_extremum dut (.clk, .rst, .cand_valid(cv), .cand_x(cx), .cand_y(cy), .cand_scale(cs),
    .cand_d2(d2), .cand_h4(h4), .ip_valid(iv), .ip_x(ix), .ip_y(iy), .ip_scale(is));
  `WATCHDOG(20000)

  typedef struct { bit acc; int x, y, s; } exp_t;
  exp_t q [$];
  int nacc = 0, nrej = 0, nout = 0;

  function automatic real det3(real m [3][3]);
    return m[0][0] * (m[1][1] * m[2][2] - m[1][2] * m[2][1])
         - m[0][1] * (m[1][0] * m[2][2] - m[1][2] * m[2][0])
         + m[0][2] * (m[1][0] * m[2][1] - m[1][1] * m[2][0]);
  endfunction

  // pipeline model: the output at an edge belongs to the candidate sampled
  // at the edge before
  exp_t e_cur, samp1, exp_now;
  bit   v_samp1 = 0, v_now;
  always @(posedge clk) begin
    exp_now = samp1; v_now = v_samp1;
    samp1 = e_cur; v_samp1 = cv;
    #1;
    if (v_now) begin
      nout++;
      `CHECK(iv == exp_now.acc, $sformatf("decision %0d expected %0d", iv, exp_now.acc))
      if (exp_now.acc) `CHECK(ix == exp_now.x && iy == exp_now.y && is == 2'(exp_now.s), "position")
    end else `CHECK(!iv, "spurious output")
  end

  initial begin
    repeat (2) @(negedge clk); rst = 0;
    for (int n = 0; n < 600; n++) begin
      real H [3][3], Hc [3][3], D [3], dt, o;
      longint hv [6], dv [3];
      exp_t e;
      bit amb;
      // mostly negative-definite Hessians (true maxima), random gradients
      hv[0] = -longint'($urandom_range(50, 4000)); hv[1] = -longint'($urandom_range(50, 4000));
      hv[2] = -longint'($urandom_range(50, 4000));
      for (int i = 3; i < 6; i++) hv[i] = longint'($urandom_range(0, 1600)) - 800;
      for (int i = 0; i < 3; i++) dv[i] = longint'($urandom_range(0, 3000)) - 1500;
      if (n % 7 == 0) for (int i = 0; i < 6; i++) hv[i] = hv[i] * 1000;  // large values
      H[0][0] = hv[0] / 4.0; H[1][1] = hv[1] / 4.0; H[2][2] = hv[2] / 4.0;
      H[0][1] = hv[3] / 4.0; H[1][0] = H[0][1];
      H[0][2] = hv[4] / 4.0; H[2][0] = H[0][2];
      H[1][2] = hv[5] / 4.0; H[2][1] = H[1][2];
      for (int i = 0; i < 3; i++) D[i] = dv[i] / 2.0;
      dt = det3(H);
      e.acc = (dt != 0.0); amb = 0;
      for (int i = 0; i < 3; i++) begin
        Hc = H;
        for (int r = 0; r < 3; r++) Hc[r][i] = -D[r];
        o = (dt != 0.0) ? det3(Hc) / dt : 1.0;
        if (o >= 0.5 || o <= -0.5) e.acc = 0;
        if (o > 0.4999 && o < 0.5001 || o < -0.4999 && o > -0.5001) amb = 1;
      end
      if (amb) begin n--; continue; end
      e.x = int'($urandom_range(0, 799)); e.y = int'($urandom_range(0, 599)); e.s = int'($urandom_range(0, 3));
      if (e.acc) nacc++; else nrej++;
      cv = 1; cx = 10'(e.x); cy = 10'(e.y); cs = 2'(e.s);
      for (int i = 0; i < 3; i++) d2[i] = (HW+4)'(dv[i]);
      for (int i = 0; i < 6; i++) h4[i] = (HW+4)'(hv[i]);
      e_cur = e;
      @(negedge clk);
    end
    cv = 0;
    repeat (4) @(negedge clk);
    `CHECK(nacc > 20 && nrej > 20, $sformatf("accepted %0d rejected %0d", nacc, nrej))
    `CHECK(nout == 600, $sformatf("outputs %0d", nout))
    `TB_FINISH
  end
endmodule
