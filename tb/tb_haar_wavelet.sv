// tb_haar_wavelet: sends the 26x26 integral samples of random pixel blocks
// (once gap-free, once with random gaps) and checks all 24x24 responses
// against pixel sums: dx = (2 pixels right of the centre column) - (2
// pixels left of it), dy = (2 pixels below the centre row) - (2 above).
// With gap-free input the first response must come on the 56th clock edge,
// counting the edge that takes the first sample as the first.
`timescale 1ns/1ps
`include "tb_util.svh"
module tb_haar_wavelet;
  import surf_pkg::*;
  localparam int NB = 26;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic start = 0, in_valid = 0, ov;
  logic [IW-1:0] ii;
  logic signed [RW-1:0] dx, dy;
  haar_wavelet #(.NB(NB)) dut (.clk, .rst, .start, .in_valid, .ii, .out_valid(ov), .dx, .dy);
  `WATCHDOG(20000)
  int p [NB][NB];
  int nout, edge_n = 0, first_in, first_out;
  always @(posedge clk) begin
    edge_n++;
    #1;
    if (ov) begin
      int r, c, ex, ey;
      r = nout / (NB - 2); c = nout % (NB - 2);
      // window centre at pixel-grid row r+1, column c+1
      ex = p[r+1][c+2] + p[r+2][c+2] - p[r+1][c+1] - p[r+2][c+1];
      ey = p[r+2][c+1] + p[r+2][c+2] - p[r+1][c+1] - p[r+1][c+2];
      `CHECK(dx == ex && dy == ey, $sformatf("resp %0d: dx %0d/%0d dy %0d/%0d", nout, dx, ex, dy, ey))
      if (nout == 0) first_out = edge_n;
      nout++;
    end
  end
  initial begin
    repeat (2) @(negedge clk); rst = 0;
    for (int run = 0; run < 3; run++) begin
      foreach (p[r, c]) p[r][c] = int'($urandom_range(0, 255));
      start = 1; @(negedge clk); start = 0; nout = 0;
      for (int r = 0; r < NB; r++)
        for (int c = 0; c < NB; c++) begin
          longint s;
          s = 0;
          for (int y = 0; y <= r; y++) for (int x = 0; x <= c; x++) s += p[y][x];
          in_valid = 1; ii = IW'(s);
          if (r == 0 && c == 0) first_in = edge_n + 1;
          @(negedge clk);
          if (run > 0 && $urandom_range(0, 3) == 0) begin in_valid = 0; @(negedge clk); end
        end
      in_valid = 0;
      repeat (4) @(negedge clk);
      `CHECK(nout == (NB - 2) * (NB - 2), $sformatf("responses %0d", nout))
      if (run == 0) `CHECK(first_out - first_in + 1 == 56, $sformatf("latency %0d", first_out - first_in + 1))
    end
    `TB_FINISH
  end
endmodule
