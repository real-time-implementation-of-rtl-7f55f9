// tb_is_extreme: feeds synthetic determinant maps for a 64-pixel-wide frame:
// one 3x3x3 maximum in octave 0 (sampling step 2), one in octave 1 (step 4),
// one point beaten by a neighbour in the layer above and one point below the
// threshold. Checks that exactly the two maxima are reported, with position,
// scale index and the nine scaled derivatives computed here from the map.
`timescale 1ns/1ps
`include "tb_util.svh"
module tb_is_extreme;
  import surf_pkg::*;
  localparam int W = 64, NP = W - 26;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic h_valid = 0;
  logic [9:0] xc, yc;
  det_t det [NSIZE];
  logic cv; logic [9:0] cx, cy; logic [1:0] cs;
  logic signed [HW+3:0] d2 [3];
  logic signed [HW+3:0] h4 [6];
  is_extreme #(.W(W), .THRESH(400)) dut (.clk, .rst, .h_valid, .xc, .yc, .det,
    .cand_valid(cv), .cand_x(cx), .cand_y(cy), .cand_scale(cs), .cand_d2(d2), .cand_h4(h4));
  `WATCHDOG(20000)

  function automatic longint f(int x, int y, int k);
    // octave-0 peak at (10,12) on size index 1
    if (x == 10 && y == 12 && k == 1) return 1000;
    if (k == 1 && x == 12 && y == 12) return 400;
    if (k == 1 && x == 8  && y == 12) return 200;
    if (k == 1 && x == 10 && y == 14) return 300;
    if (k == 1 && x == 10 && y == 10) return 100;
    if (k == 1 && x == 12 && y == 14) return 50;
    if (k == 1 && x == 8  && y == 10) return 20;
    if (k == 1 && x == 12 && y == 10) return 10;
    if (k == 1 && x == 8  && y == 14) return 5;
    if (k == 0 && x == 10 && y == 12) return 600;
    if (k == 2 && x == 10 && y == 12) return 700;
    if (k == 2 && x == 12 && y == 12) return 70;
    if (k == 0 && x == 8  && y == 12) return 30;
    if (k == 2 && x == 10 && y == 14) return 60;
    if (k == 0 && x == 10 && y == 10) return 40;
    // octave-1 peak at (24,20) on size index 4 (layers 3,4,5 around it)
    if (k == 4 && x == 24 && y == 20) return 5000;
    if (k == 4 && x == 28 && y == 20) return 1000;
    if (k == 4 && x == 24 && y == 24) return 2000;
    if (k == 3 && x == 24 && y == 20) return 3000;
    if (k == 5 && x == 24 && y == 20) return 1500;
    if (k == 5 && x == 28 && y == 24) return 700;
    // beaten point and weak point
    if (k == 2 && x == 30 && y == 30) return 900;
    if (k == 3 && x == 30 && y == 30) return 950;
    if (k == 1 && x == 16 && y == 6)  return 300;
    return 0;
  endfunction

  int ncand = 0;
  // layer size index of octave o, position p
  function automatic int lay(int o, int p);
    if (o == 0) return p;
    return (p == 0) ? 1 : (p == 1) ? 3 : (p == 2) ? 4 : 5;
  endfunction

  task automatic expect_cand(int x, int y, int o, int p);
    int S; longint v, e [9];
    S = (o == 0) ? 2 : 4;
    v = f(x, y, lay(o, p));
    e[0] = f(x + S, y, lay(o, p)) - f(x - S, y, lay(o, p));
    e[1] = f(x, y + S, lay(o, p)) - f(x, y - S, lay(o, p));
    e[2] = f(x, y, lay(o, p + 1)) - f(x, y, lay(o, p - 1));
    e[3] = 4 * (f(x + S, y, lay(o, p)) + f(x - S, y, lay(o, p)) - 2 * v);
    e[4] = 4 * (f(x, y + S, lay(o, p)) + f(x, y - S, lay(o, p)) - 2 * v);
    e[5] = 4 * (f(x, y, lay(o, p + 1)) + f(x, y, lay(o, p - 1)) - 2 * v);
    e[6] = f(x + S, y + S, lay(o, p)) - f(x - S, y + S, lay(o, p)) - f(x + S, y - S, lay(o, p)) + f(x - S, y - S, lay(o, p));
    e[7] = f(x + S, y, lay(o, p + 1)) - f(x - S, y, lay(o, p + 1)) - f(x + S, y, lay(o, p - 1)) + f(x - S, y, lay(o, p - 1));
    e[8] = f(x, y + S, lay(o, p + 1)) - f(x, y - S, lay(o, p + 1)) - f(x, y + S, lay(o, p - 1)) + f(x, y - S, lay(o, p - 1));
    `CHECK(cx == x && cy == y && cs == 2'(o * 2 + p - 1),
           $sformatf("candidate at %0d,%0d s%0d, expected %0d,%0d s%0d", cx, cy, cs, x, y, o * 2 + p - 1))
    for (int i = 0; i < 3; i++) `CHECK(longint'(d2[i]) == e[i], $sformatf("d2[%0d] %0d exp %0d", i, d2[i], e[i]))
    for (int i = 0; i < 6; i++) `CHECK(longint'(h4[i]) == e[3 + i], $sformatf("h4[%0d] %0d exp %0d", i, h4[i], e[3 + i]))
  endtask

  always @(posedge clk) begin
    #1;
    if (cv) begin
      ncand++;
      if (cs <= 1) expect_cand(10, 12, 0, 1);
      else         expect_cand(24, 20, 1, 2);
    end
  end

  initial begin
    repeat (2) @(posedge clk); #1; rst = 0;
    for (int y = 0; y < NP; y++) begin
      for (int x = 0; x < NP; x++) begin
        h_valid = 1; xc = 10'(x); yc = 10'(y);
        for (int k = 0; k < NSIZE; k++) det[k] = det_t'(f(x, y, k));
        @(posedge clk); #1;
      end
      h_valid = 0;
      repeat (3) @(posedge clk); #1;
    end
    repeat (3) @(posedge clk); #1;
    `CHECK(ncand == 2, $sformatf("%0d candidates", ncand))
    `TB_FINISH
  end
endmodule
