// tb_diff_compare: all-corner and random (cur, prev) pairs; a pixel is
// highlighted (FF0000, moving) when |cur - prev| >= 30, otherwise shown as
// gray on all three channels; one-cycle registered output.
`timescale 1ns/1ps
`include "tb_util.svh"
module tb_diff_compare;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [7:0] cur = 0, prev = 0;
  logic [23:0] rgb_out;
  logic moving;
  diff_compare #(.THRESH(30)) dut (.clk, .cur, .prev, .rgb_out, .moving);
  `WATCHDOG(20000)
  task automatic one(int c, int p);
    int d;
    @(negedge clk); cur = 8'(c); prev = 8'(p);
    @(posedge clk); #1;
    d = (c > p) ? c - p : p - c;
    `CHECK(moving == (d >= 30), $sformatf("cur %0d prev %0d moving %0b", c, p, moving))
    `CHECK(rgb_out == ((d >= 30) ? 24'hFF0000 : {cur, cur, cur}), $sformatf("cur %0d prev %0d rgb %h", c, p, rgb_out))
  endtask
  initial begin
    one(0, 0); one(29, 0); one(30, 0); one(0, 30); one(0, 29); one(255, 225); one(255, 226);
    one(255, 0); one(0, 255); one(100, 70); one(100, 71);
    for (int i = 0; i < 3000; i++) one($urandom_range(0, 255), $urandom_range(0, 255));
    for (int i = 0; i < 1000; i++) begin
      int c;
      c = $urandom_range(40, 215);
      one(c, c + $urandom_range(0, 80) - 40);
    end
    `TB_FINISH
  end
endmodule
