// tb_video_detect_top: end-to-end test of both detectors at a reduced frame
// size (112x104, three frames); the checks are described in tb_top_body.svh.
`timescale 1ns/1ps
`include "tb_util.svh"
module tb_video_detect_top;
  import surf_pkg::*;
  localparam int W = 112, H = 104, NFR = 3;
  localparam bit MOTION = 1;
  video_detect_top #(.W(W), .H(H), .IPF_DEPTH(64)) dut (.clk, .rst,
    .s_rgb(rgb), .s_vsync(vsync), .s_hsync(hsync), .s_de(de),
    .ddr_wr_en, .ddr_wr_addr, .ddr_wr_data, .ddr_rd_req, .ddr_rd_addr, .ddr_rd_ready,
    .ddr_rd_valid, .ddr_rd_data, .det_valid, .detected, .det_sum, .ip_count, .ip_dropped,
    .desc_count, .d_rgb(rgb), .d_vsync(vsync), .d_hsync(hsync), .d_de(de),
    .d_out_rgb, .d_out_vsync, .d_out_hsync, .d_out_de, .d_moving);
  `WATCHDOG(2000000)
  `include "tb_top_body.svh"
endmodule
