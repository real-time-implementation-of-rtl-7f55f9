// tb_gaussian_mask_lut: reads every entry of every scale unit through
// random ports and compares with 0x3BDCB4DC * exp(-((r-5)^2+(c-5)^2)/21.78),
// the Gaussian the table is built from (tolerance 1 part in 2^20 of the
// peak); also checks the one-cycle registered read and the peak position.
`timescale 1ns/1ps
`include "tb_util.svh"
module tb_gaussian_mask_lut;
  import surf_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [1:0] scale = 0;
  logic [3:0] lr [NSUB], lc [NSUB];
  logic [GW-1:0] mask [NSUB];
  gaussian_mask_lut dut (.clk, .scale, .lr, .lc, .mask);
  `WATCHDOG(10000)
  initial begin
    int er [NSUB], ec [NSUB];
    longint maxv;
    foreach (lr[p]) begin lr[p] = 0; lc[p] = 0; end
    @(negedge clk);
    for (int s = 0; s < 4; s++)
      for (int it = 0; it < 40; it++) begin
        scale = 2'(s);
        foreach (lr[p]) begin
          er[p] = $urandom_range(0, 8); ec[p] = $urandom_range(0, 8);
          lr[p] = 4'(er[p]); lc[p] = 4'(ec[p]);
        end
        @(posedge clk); #1;
        foreach (lr[p]) begin
          real ex;
          ex = real'(32'h3BDCB4DC) * $exp(-real'((er[p]-5)**2 + (ec[p]-5)**2) / (2.0 * 3.3 * 3.3));
          `CHECK(real'(mask[p]) - ex < 1024.0 && ex - real'(mask[p]) < 1024.0,
                 $sformatf("scale %0d (%0d,%0d): %0d vs %0f", s, er[p], ec[p], mask[p], ex))
        end
        @(negedge clk);
      end
    // peak at (5,5)
    maxv = 0;
    for (int r = 0; r < 9; r++)
      for (int c = 0; c < 9; c++) begin
        lr[0] = 4'(r); lc[0] = 4'(c);
        @(posedge clk); #1;
        if (r == 5 && c == 5) `CHECK(mask[0] == 32'h3BDCB4DC, "peak value")
        if (longint'(mask[0]) > maxv) maxv = mask[0];
        @(negedge clk);
      end
    `CHECK(maxv == 32'h3BDCB4DC, "peak is the maximum")
    `TB_FINISH
  end
endmodule
