// tb_surf_system: end-to-end test of the SURF object detector alone at
// 112x104, three frames, with a memory model that stalls reads and returns
// data four cycles late. The checks are those of tb_top_body.svh without
// the motion detector: integral values written to memory, the decision sum
// recomputed from the descriptors that reached the matcher, one decision
// per frame, and that point FIFO overflow, descriptor FIFO back-pressure
// and read stalls all occur.
`timescale 1ns/1ps
`include "tb_util.svh"
module tb_surf_system;
  import surf_pkg::*;
  localparam int W = 112, H = 104, NFR = 3;
  localparam bit MOTION = 0;
  if (1) begin : dut
    surf_system #(.W(W), .H(H), .IPF_DEPTH(64)) u_surf (.clk, .rst, .rgb, .vsync, .hsync, .de,
      .ddr_wr_en, .ddr_wr_addr, .ddr_wr_data, .ddr_rd_req, .ddr_rd_addr, .ddr_rd_ready,
      .ddr_rd_valid, .ddr_rd_data, .det_valid, .detected, .det_sum, .ip_count, .ip_dropped,
      .desc_count);
  end
  assign d_out_rgb = '0;
  assign {d_out_vsync, d_out_hsync, d_out_de, d_moving} = '0;
  `WATCHDOG(2000000)
  `include "tb_top_body.svh"
endmodule
