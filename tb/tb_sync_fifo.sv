// tb_sync_fifo: random pushes and pops against a queue model; checks the
// head word, empty/full flags, and that a write while full is dropped and
// flagged as overflow.
`timescale 1ns/1ps
`include "tb_util.svh"
module tb_sync_fifo;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic wr_en = 0, rd_en = 0, full, empty, ovf;
  logic [15:0] din, dout;
  sync_fifo #(.WIDTH(16), .DEPTH(8)) dut (.clk, .rst, .wr_en, .din, .full, .rd_en, .dout, .empty, .overflow(ovf));
  `WATCHDOG(20000)
  logic [15:0] q [$];
  int novf = 0, nfull = 0;
  initial begin
    repeat (2) @(negedge clk); rst = 0;
    for (int n = 0; n < 3000; n++) begin
      bit exp_ovf;
      `CHECK(empty == (q.size() == 0), "empty flag")
      `CHECK(full == (q.size() == 8), "full flag")
      if (q.size() > 0) `CHECK(dout == q[0], $sformatf("head %h exp %h", dout, q[0]))
      if (full) nfull++;
      wr_en = ($urandom_range(0, 99) < ((n / 500) % 2 ? 70 : 35));
      rd_en = !empty && ($urandom_range(0, 99) < 50);
      din = 16'($urandom);
      exp_ovf = wr_en && q.size() == 8;
      @(posedge clk); #1;
      if (rd_en) void'(q.pop_front());
      if (wr_en && !exp_ovf) q.push_back(din);
      `CHECK(ovf == exp_ovf, "overflow flag")
      if (ovf) novf++;
      @(negedge clk);
    end
    `CHECK(novf > 0 && nfull > 0, $sformatf("full %0d overflow %0d", nfull, novf))
    `TB_FINISH
  end
endmodule
