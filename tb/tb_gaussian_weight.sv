// tb_gaussian_weight: drives random responses, masks and sub-region
// memberships laid out as the reconstructor produces them (a response lies
// in sub-region k or k+8, never both) and compares the 64 sums with an
// integer model: sum over the members of (response * weight) >>> 24, and of
// its absolute value (responses up to 3e7, inside the 36-bit product
// range). Also checks done two cycles after last and clear.
`timescale 1ns/1ps
`include "tb_util.svh"
module tb_gaussian_weight;
  import surf_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic clear = 0, last = 0, done;
  logic [NSUB-1:0] pv;
  logic signed [RW-1:0] dx, dy;
  logic [GW-1:0] mask [NSUB];
  delem_t pred [DLEN];
  gaussian_weight dut (.clk, .rst, .clear, .port_valid(pv), .dx, .dy, .mask, .last, .pred, .done);
  `WATCHDOG(20000)
  longint m [DLEN];
  function automatic longint wm(int r, logic [GW-1:0] g);
    return (longint'(r) * longint'(g)) >>> 24;
  endfunction
  initial begin
    pv = '0; dx = 0; dy = 0;
    foreach (mask[k]) mask[k] = 0;
    repeat (2) @(negedge clk); rst = 0;
    for (int run = 0; run < 4; run++) begin
      int done_at, last_at;
      clear = 1; @(negedge clk); clear = 0;
      foreach (m[i]) m[i] = 0;
      for (int n = 0; n < 300; n++) begin
        logic [NSUB-1:0] v;
        int a, b;
        v = NSUB'($urandom) & NSUB'($urandom);
        for (int k = 0; k < 8; k++) if (v[k]) v[k + 8] = 1'b0;
        a = $urandom_range(0, 2000000) - 1000000;
        b = $urandom_range(0, 2000000) - 1000000;
        if (run == 3) begin a = a * 30; b = -b * 30; end
        pv = v; dx = a; dy = b; last = (n == 299);
        foreach (mask[k]) begin
          mask[k] = $urandom;
          if (v[k]) begin
            m[k] += wm(a, mask[k]); m[16 + k] += wm(b, mask[k]);
            m[32 + k] += (wm(a, mask[k]) < 0) ? -wm(a, mask[k]) : wm(a, mask[k]);
            m[48 + k] += (wm(b, mask[k]) < 0) ? -wm(b, mask[k]) : wm(b, mask[k]);
          end
        end
        @(negedge clk);
        if ($urandom_range(0, 3) == 0) begin pv = '0; last = 0; @(negedge clk); end
      end
      pv = '0; last = 0;
      last_at = 0; done_at = 0;
      for (int c = 1; c < 6 && done_at == 0; c++) begin
        if (done) done_at = c;
        @(negedge clk);
      end
      `CHECK(done_at == 1 || done_at == 2, $sformatf("done at %0d", done_at))
      repeat (2) @(negedge clk);
      foreach (m[i]) `CHECK(longint'(pred[i]) == m[i], $sformatf("run %0d elem %0d: %0d vs %0d", run, i, pred[i], m[i]))
    end
    clear = 1; @(negedge clk); clear = 0;
    foreach (pred[i]) `CHECK(pred[i] == 0, "cleared")
    `TB_FINISH
  end
endmodule
