// tb_pingpong_buffer: writes three small frames (with idle cycles between
// pixels) and checks that while frame n is written, rdata returns frame
// n-1's pixel at the same address one cycle later, that the halves swap on
// frame_end, and that the first frame reads back the unwritten half.
`timescale 1ns/1ps
`include "tb_util.svh"
module tb_pingpong_buffer;
  localparam int W = 12, H = 5, N = W * H;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic we = 0, frame_end = 0, part;
  logic [19:0] addr = 0;
  logic [7:0] wdata = 0, rdata;
  pingpong_buffer #(.W(W), .H(H), .DW(8)) dut (.clk, .rst, .we, .addr, .wdata, .frame_end, .rdata, .part);
  `WATCHDOG(5000)
  logic [7:0] fr [4][N];
  initial begin
    foreach (fr[f, a]) fr[f][a] = 8'($urandom);
    repeat (2) @(negedge clk); rst = 0;
    for (int f = 0; f < 4; f++) begin
      `CHECK(part == f[0], $sformatf("frame %0d half %0b", f, part))
      for (int a = 0; a < N; a++) begin
        we = 1; addr = 20'(a); wdata = fr[f][a]; frame_end = (a == N - 1);
        @(posedge clk); #1;
        if (f > 0) `CHECK(rdata == fr[f-1][a], $sformatf("frame %0d addr %0d: %0d vs %0d", f, a, rdata, fr[f-1][a]))
        @(negedge clk);
        we = 0; frame_end = 0;
        if ($urandom_range(0, 3) == 0) @(negedge clk);
      end
    end
    // reads without writes do not disturb the frame
    for (int a = 0; a < N; a++) begin
      addr = 20'(a); @(posedge clk); #1;
      `CHECK(rdata == fr[3][a], "read-only pass")
      @(negedge clk);
    end
    `TB_FINISH
  end
endmodule
