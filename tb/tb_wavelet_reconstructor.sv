// tb_wavelet_reconstructor: streams a 24x24 response window (with random
// gaps) and checks, for every response, which of the 16 sub-regions claim
// it and the local row/column they report, against the 9x9-with-step-5
// tiling; also checks that every sub-region receives exactly 81 responses
// and that last marks the final one.
`timescale 1ns/1ps
`include "tb_util.svh"
module tb_wavelet_reconstructor;
  import surf_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic start = 0, in_valid = 0, last;
  logic signed [RW-1:0] in_dx, in_dy, dx, dy;
  logic [NSUB-1:0] pv;
  logic [3:0] lr [NSUB], lc [NSUB];
  wavelet_reconstructor dut (.clk, .rst, .start, .in_valid, .in_dx, .in_dy,
    .port_valid(pv), .lr, .lc, .dx, .dy, .last);
  `WATCHDOG(5000)
  int nin, nout, cnt [NSUB];
  int q_r [$], q_c [$];
  always @(posedge clk) begin
    #1;
    if (pv != 0 || last) begin
      int r, c;
      r = q_r.pop_front(); c = q_c.pop_front();
      `CHECK(dx == RW'(r * 100 + c) && dy == -RW'(r * 100 + c), $sformatf("data at %0d,%0d", r, c))
      `CHECK(last == (r == 23 && c == 23), $sformatf("last at %0d,%0d", r, c))
      for (int k = 0; k < NSUB; k++) begin
        int r0, c0;
        bit in_k;
        r0 = (k / 4) * 5; c0 = (k % 4) * 5;
        in_k = r >= r0 && r < r0 + 9 && c >= c0 && c < c0 + 9;
        `CHECK(pv[k] == in_k, $sformatf("membership k=%0d at %0d,%0d", k, r, c))
        if (in_k) begin
          cnt[k]++;
          `CHECK(int'(lr[k]) == r - r0 && int'(lc[k]) == c - c0, $sformatf("local addr k=%0d", k))
        end
      end
      nout++;
    end
  end
  initial begin
    repeat (2) @(negedge clk); rst = 0;
    for (int run = 0; run < 2; run++) begin
      start = 1; @(negedge clk); start = 0;
      foreach (cnt[k]) cnt[k] = 0;
      nout = 0;
      for (int r = 0; r < 24; r++)
        for (int c = 0; c < 24; c++) begin
          in_valid = 1; in_dx = RW'(r * 100 + c); in_dy = -RW'(r * 100 + c);
          q_r.push_back(r); q_c.push_back(c);
          @(negedge clk);
          if (run == 1 && $urandom_range(0, 2) == 0) begin in_valid = 0; @(negedge clk); end
        end
      in_valid = 0;
      repeat (3) @(negedge clk);
      `CHECK(nout == 576, $sformatf("responses %0d", nout))
      foreach (cnt[k]) `CHECK(cnt[k] == 81, $sformatf("sub-region %0d got %0d", k, cnt[k]))
    end
    `TB_FINISH
  end
endmodule
