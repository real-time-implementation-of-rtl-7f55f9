// tb_seq_divider: random and edge-case divisions (including the 2^62 / norm
// use), checking the quotient, the N-cycle latency and busy.
`timescale 1ns/1ps
`include "tb_util.svh"
module tb_seq_divider;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic start = 0, busy, done;
  logic [63:0] num, den, quo;
  seq_divider #(.N(64)) dut (.clk, .rst, .start, .num, .den, .busy, .done, .quo);
  `WATCHDOG(200000)
  task automatic div(logic [63:0] n, logic [63:0] d);
    int cyc;
    num = n; den = d; start = 1; @(negedge clk); start = 0;
    `CHECK(busy, "busy after start")
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    `CHECK(cyc == 65, $sformatf("latency %0d", cyc))
    if (d == 0) `CHECK(quo == '1, "divide by zero")
    else `CHECK(quo == n / d, $sformatf("%0d / %0d = %0d", n, d, quo))
    `CHECK(!busy, "idle after done")
    @(negedge clk);
  endtask
  initial begin
    repeat (2) @(negedge clk); rst = 0;
    div(64'd100, 64'd7);
    div(64'd1 << 62, 64'd1);
    div(64'd1 << 62, 64'd3);
    div(64'd5, 64'd9);
    div(64'd0, 64'd5);
    div(64'd77, 64'd0);
    for (int i = 0; i < 300; i++) begin
      logic [63:0] n, d;
      n = {$urandom, $urandom};
      d = {$urandom, $urandom} >> $urandom_range(1, 63);
      if (i % 3 == 0) n = 64'd1 << 62;
      div(n, d);
    end
    `TB_FINISH
  end
endmodule
