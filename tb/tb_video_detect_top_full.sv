// tb_video_detect_top_full: the end-to-end test of tb_top_body.svh with
// the top at its default parameters: two 800x600 frames through both
// detectors; after each, its points are described and matched and the
// frame decision is checked.
`timescale 1ns/1ps
`include "tb_util.svh"
module tb_video_detect_top_full;
  import surf_pkg::*;
  localparam int W = 800, H = 600, NFR = 2;
  localparam bit MOTION = 1;
  video_detect_top dut (.clk, .rst,
    .s_rgb(rgb), .s_vsync(vsync), .s_hsync(hsync), .s_de(de),
    .ddr_wr_en, .ddr_wr_addr, .ddr_wr_data, .ddr_rd_req, .ddr_rd_addr, .ddr_rd_ready,
    .ddr_rd_valid, .ddr_rd_data, .det_valid, .detected, .det_sum, .ip_count, .ip_dropped,
    .desc_count, .d_rgb(rgb), .d_vsync(vsync), .d_hsync(hsync), .d_de(de),
    .d_out_rgb, .d_out_vsync, .d_out_hsync, .d_out_de, .d_moving);
  `WATCHDOG(3000000)
  `include "tb_top_body.svh"
endmodule
