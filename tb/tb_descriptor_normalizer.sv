// tb_descriptor_normalizer: random pre-descriptors through the normaliser,
// compared with an integer model of the 4x4 sigma-1.5 scaling, the L1 norm
// and the reciprocal multiply; also checks that the absolute sum of the
// output is 2^30 within rounding (64 element floors plus the relative
// error 1/recip of the truncated reciprocal), the latency and the all-zero case.
`timescale 1ns/1ps
`include "tb_util.svh"
module tb_descriptor_normalizer;
  import surf_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic start = 0, dv;
  delem_t pred [DLEN], desc [DLEN];
  descriptor_normalizer dut (.clk, .rst, .start, .pred, .desc_valid(dv), .desc);
  `WATCHDOG(100000)
  function automatic longint g(int k);
    real d2;
    d2 = (real'(k / 4) - 1.5) ** 2 + (real'(k % 4) - 1.5) ** 2;
    return longint'($floor(65536.0 * $exp(-d2 / (2.0 * 1.5 * 1.5)) + 0.5));
  endfunction
  initial begin
    repeat (2) @(negedge clk); rst = 0;
    for (int run = 0; run < 40; run++) begin
      longint w [DLEN], norm, recip, sum;
      int lat;
      foreach (pred[i]) begin
        longint v;
        v = longint'({$urandom, $urandom}) >>> (24 + $urandom_range(0, 16));
        if (run == 0) v = 0;
        if (run == 1) v = (i == 5) ? 1000 : 0;
        pred[i] = DW'(v);
        w[i] = (v * g(i % 16)) >>> 16;
      end
      norm = 0;
      foreach (w[i]) norm += (w[i] < 0) ? -w[i] : w[i];
      recip = (norm == 0) ? 0 : (64'd1 << 62) / norm;
      start = 1; @(negedge clk); start = 0;
      lat = 1;
      while (!dv) begin @(negedge clk); lat++; end
      `CHECK(lat == 68, $sformatf("latency %0d", lat))
      sum = 0;
      foreach (desc[i]) begin
        longint e;
        e = (w[i] * recip) >>> 32;
        `CHECK(longint'(desc[i]) == e, $sformatf("run %0d elem %0d: %0d vs %0d", run, i, desc[i], e))
        sum += (desc[i] < 0) ? -longint'(desc[i]) : longint'(desc[i]);
      end
      if (norm != 0) `CHECK(sum <= (64'd1 << 30) && sum > (64'd1 << 30) - 64 - (64'd1 << 30) / recip - 1, $sformatf("unit sum %0d", sum))
      else `CHECK(sum == 0, "zero descriptor")
      @(negedge clk);
    end
    `TB_FINISH
  end
endmodule
