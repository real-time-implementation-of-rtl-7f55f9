// tb_descriptor_extractor: feeds the 26x26 integral samples of random pixel
// blocks (one run gap-free, one with gaps, all four scales) and compares the
// 64-element descriptor with a floating-point model of the whole chain:
// Haar responses from pixel sums, the 9x9 Gaussian of sigma 3.3 per
// sub-region, the 4x4 Gaussian of sigma 1.5 and L1 normalisation to 2^30.
// Tolerance: 2^30 / 20000 per element. Also checks busy and the gap-free
// latency.
`timescale 1ns/1ps
`include "tb_util.svh"
module tb_descriptor_extractor;
  import surf_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic start = 0, nb_valid = 0, busy, dv;
  logic [1:0] scale = 0;
  logic [IW-1:0] nb_data;
  delem_t desc [DLEN];
  descriptor_extractor dut (.clk, .rst, .start, .scale, .nb_valid, .nb_data, .busy, .desc_valid(dv), .desc);
  `WATCHDOG(50000)
  int p [26][26];
  real ref_d [DLEN];
  task automatic model();
    real pre [DLEN], norm;
    foreach (pre[i]) pre[i] = 0.0;
    for (int r = 0; r < 24; r++)
      for (int c = 0; c < 24; c++) begin
        real ex, ey;
        ex = p[r+1][c+2] + p[r+2][c+2] - p[r+1][c+1] - p[r+2][c+1];
        ey = p[r+2][c+1] + p[r+2][c+2] - p[r+1][c+1] - p[r+1][c+2];
        for (int k = 0; k < 16; k++) begin
          int lr, lc;
          real gw;
          lr = r - (k / 4) * 5; lc = c - (k % 4) * 5;
          if (lr >= 0 && lr < 9 && lc >= 0 && lc < 9) begin
            gw = 256.0 * real'(32'h3BDCB4DC) / 4294967296.0 *
                 $exp(-real'((lr-5)**2 + (lc-5)**2) / (2.0 * 3.3 * 3.3));
            pre[k] += ex * gw; pre[16+k] += ey * gw;
            pre[32+k] += (ex < 0 ? -ex : ex) * gw; pre[48+k] += (ey < 0 ? -ey : ey) * gw;
          end
        end
      end
    norm = 0.0;
    foreach (pre[i]) begin
      int k;
      k = i % 16;
      pre[i] *= $exp(-((real'(k / 4) - 1.5) ** 2 + (real'(k % 4) - 1.5) ** 2) / 4.5);
      norm += (pre[i] < 0) ? -pre[i] : pre[i];
    end
    foreach (pre[i]) ref_d[i] = pre[i] / norm * 1073741824.0;
  endtask
  initial begin
    repeat (2) @(negedge clk); rst = 0;
    for (int run = 0; run < 4; run++) begin
      int t0, lat;
      foreach (p[r, c]) p[r][c] = int'($urandom_range(0, 255));
      if (run == 2) foreach (p[r, c]) p[r][c] = (c > 12) ? 200 : 10;   // vertical edge
      model();
      scale = 2'(run); start = 1; @(negedge clk); start = 0;
      `CHECK(busy, "busy after start")
      t0 = $time / 10;
      for (int r = 0; r < 26; r++)
        for (int c = 0; c < 26; c++) begin
          int s;
          s = 0;
          for (int y = 0; y <= r; y++) for (int x = 0; x <= c; x++) s += p[y][x];
          nb_valid = 1; nb_data = IW'(s);
          @(negedge clk);
          if (run == 1 && $urandom_range(0, 4) == 0) begin nb_valid = 0; @(negedge clk); end
        end
      nb_valid = 0;
      while (!dv) @(negedge clk);
      lat = $time / 10 - t0;
      if (run == 0) `CHECK(lat > 676 && lat < 900, $sformatf("latency %0d", lat))
      if (run == 0) $display("extractor latency %0d cycles from first sample", lat);
      foreach (desc[i]) begin
        real e;
        e = real'(desc[i]) - ref_d[i];
        `CHECK(e < 53687.0 && e > -53687.0, $sformatf("run %0d elem %0d: %0d vs %0f", run, i, desc[i], ref_d[i]))
      end
      @(negedge clk);
      `CHECK(!busy, "idle after descriptor")
    end
    `TB_FINISH
  end
endmodule
