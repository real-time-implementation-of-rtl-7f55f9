// video_detect_top: the two real-time video detectors side by side, each
// with its own video input: the SURF object detector (surf_system), which
// decides per frame whether a library object is present, and the
// frame-differencing motion detector (diff_tracker), which highlights
// changed pixels in its output video. They share only clock and reset.
//
// The SURF detector keeps its integral images in an external DDR3 memory
// behind a memory controller; its write port and in-order read port are
// brought out here (addresses are {frame bank, row*W + col}, data are
// 28-bit integral pixels). The video interface boards are outside as well;
// their sync and pixel signals are the ports. Frame size 800x600 at one
// pixel per clock is the original design's configuration; IPF_DEPTH is the depth
// of the interest point FIFO (see surf_system).
module video_detect_top
  import surf_pkg::*;
#(
  parameter int W = 800,
  parameter int H = 600,
  parameter int IPF_DEPTH = 512
) (
  input  logic          clk,
  input  logic          rst,
  // SURF detector video in
  input  logic [23:0]   s_rgb,
  input  logic          s_vsync,
  input  logic          s_hsync,
  input  logic          s_de,
  // DDR3 memory controller ports
  output logic          ddr_wr_en,
  output logic [20:0]   ddr_wr_addr,
  output logic [IW-1:0] ddr_wr_data,
  output logic          ddr_rd_req,
  output logic [20:0]   ddr_rd_addr,
  input  logic          ddr_rd_ready,
  input  logic          ddr_rd_valid,
  input  logic [IW-1:0] ddr_rd_data,
  // SURF decision
  output logic          det_valid,
  output logic          detected,
  output logic [63:0]   det_sum,
  output logic [15:0]   ip_count,
  output logic [15:0]   ip_dropped,
  output logic [15:0]   desc_count,
  // motion detector video in and out
  input  logic [23:0]   d_rgb,
  input  logic          d_vsync,
  input  logic          d_hsync,
  input  logic          d_de,
  output logic [23:0]   d_out_rgb,
  output logic          d_out_vsync,
  output logic          d_out_hsync,
  output logic          d_out_de,
  output logic          d_moving
);
  surf_system #(.W(W), .H(H), .IPF_DEPTH(IPF_DEPTH)) u_surf (
    .clk, .rst, .rgb(s_rgb), .vsync(s_vsync), .hsync(s_hsync), .de(s_de),
    .ddr_wr_en, .ddr_wr_addr, .ddr_wr_data,
    .ddr_rd_req, .ddr_rd_addr, .ddr_rd_ready, .ddr_rd_valid, .ddr_rd_data,
    .det_valid, .detected, .det_sum, .ip_count, .ip_dropped, .desc_count);

  diff_tracker #(.W(W), .H(H)) u_diff (
    .clk, .rst, .rgb(d_rgb), .vsync(d_vsync), .hsync(d_hsync), .de(d_de),
    .out_rgb(d_out_rgb), .out_vsync(d_out_vsync), .out_hsync(d_out_hsync),
    .out_de(d_out_de), .moving(d_moving));
endmodule
