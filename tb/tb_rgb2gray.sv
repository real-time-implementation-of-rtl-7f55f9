// tb_rgb2gray: drives random and corner RGB values and checks the gray
// output one cycle later against the real-valued weighted sum
// 0.2989 R + 0.5870 G + 0.114 B (within one gray level).
`timescale 1ns/1ps
`include "tb_util.svh"
module tb_rgb2gray;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [23:0] rgb;
  logic [7:0]  gray;
  rgb2gray dut (.clk, .rgb, .gray);
  `WATCHDOG(5000)
  initial begin
    for (int i = 0; i < 1000; i++) begin
      real e;
      rgb = (i == 0) ? 24'hFFFFFF : (i == 1) ? 24'h000000 : 24'($urandom);
      e = 0.2989 * rgb[23:16] + 0.5870 * rgb[15:8] + 0.114 * rgb[7:0];
      @(posedge clk); #1;
      `CHECK(int'(gray) >= $rtoi(e) - 1 && int'(gray) <= $rtoi(e) + 1,
             $sformatf("rgb %h gray %0d expect %f", rgb, gray, e))
    end
    `CHECK(1, "done")
    `TB_FINISH
  end
endmodule
