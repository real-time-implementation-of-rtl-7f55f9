// tb_library_rom: reads every address of the eight ROMs and checks each
// element against the stand-in library formula and the element layout
// (ROM b, address d*8+t holds element 8t+b of descriptor d), with the
// one-cycle registered read.
`timescale 1ns/1ps
`include "tb_util.svh"
module tb_library_rom;
  import surf_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [9:0] addr = 0;
  delem_t q [8];
  library_rom dut (.clk, .addr, .q);
  `WATCHDOG(5000)
  function automatic longint lv(int d, int e);
    longint h;
    h = (longint'(d * 64 + e + 1) * 64'd2654435761) & 64'hFFFF_FFFF;
    return ((h >> 8) - 8388608) * 4;
  endfunction
  initial begin
    for (int a = 0; a < 1024; a++) begin
      @(negedge clk); addr = 10'(a);
      @(posedge clk); #1;
      for (int b = 0; b < 8; b++)
        `CHECK(longint'(q[b]) == lv(a / 8, (a % 8) * 8 + b),
               $sformatf("addr %0d rom %0d: %0d vs %0d", a, b, q[b], lv(a / 8, (a % 8) * 8 + b)))
    end
    // registered: q must not change before the clock edge
    @(negedge clk); addr = 10'd17;
    #2 `CHECK(longint'(q[0]) == lv(127, 56), "q held until the edge")
    `TB_FINISH
  end
endmodule
