// interest_point_detector: Build_Hessian_Response, Is_Extreme and
// Interpolate_Extremum in series, with the candidate FIFO between the last
// two as in the original design's description ("The derivatives will stored into a
// FIFO with their coordinates and scales").
//
// Input: the integral image stream with positions. Output: ip_valid pulses
// with the pixel position and scale index (0..3 for s = 2..5) of every
// accepted interest point. The interpolation stage takes one candidate per
// cycle, so it pops the FIFO whenever it is not empty. Latency from the
// integral pixel that completes a candidate's 3x3x3 block: 1 (Hessian) +
// 1 (extremum) + 1 (FIFO) + 2 (interpolation) cycles.
module interest_point_detector
  import surf_pkg::*;
#(
  parameter int W      = 800,
  parameter int THRESH = 400
) (
  input  logic           clk,
  input  logic           rst,
  input  logic           ii_valid,
  input  logic [IW-1:0]  ii,
  input  logic [9:0]     ii_col,
  input  logic [9:0]     ii_row,
  output logic           ip_valid,
  output logic [9:0]     ip_x,
  output logic [9:0]     ip_y,
  output logic [1:0]     ip_scale,
  output logic           cand_seen,
  output logic           cand_overflow
);
  localparam int DV = HW + 4;
  localparam int CW = 22 + 9 * DV;

  logic        h_valid;
  logic [9:0]  hx, hy;
  det_t        det [NSIZE];

  hessian_response #(.W(W)) u_hess (
    .clk, .rst, .ii_valid, .ii, .ii_col, .ii_row,
    .h_valid, .xc(hx), .yc(hy), .det);

  logic                 cv;
  logic [9:0]           cx, cy;
  logic [1:0]           cs;
  logic signed [DV-1:0] cd2 [3];
  logic signed [DV-1:0] ch4 [6];

  is_extreme #(.W(W), .THRESH(THRESH)) u_ext (
    .clk, .rst, .h_valid, .xc(hx), .yc(hy), .det,
    .cand_valid(cv), .cand_x(cx), .cand_y(cy), .cand_scale(cs),
    .cand_d2(cd2), .cand_h4(ch4));

  logic [CW-1:0] fin, fout;
  logic          ffull, fempty;
  always_comb begin
    fin = {cx, cy, cs, cd2[0], cd2[1], cd2[2],
           ch4[0], ch4[1], ch4[2], ch4[3], ch4[4], ch4[5]};
  end

  sync_fifo #(.WIDTH(CW), .DEPTH(16)) u_fifo (
    .clk, .rst, .wr_en(cv), .din(fin), .full(ffull),
    .rd_en(!fempty), .dout(fout), .empty(fempty), .overflow(cand_overflow));

  logic [9:0]           qx, qy;
  logic [1:0]           qs;
  logic signed [DV-1:0] qd2 [3];
  logic signed [DV-1:0] qh4 [6];
  always_comb begin
    {qx, qy, qs, qd2[0], qd2[1], qd2[2],
     qh4[0], qh4[1], qh4[2], qh4[3], qh4[4], qh4[5]} = fout;
  end

  interpolate_extremum u_int (
    .clk, .rst, .cand_valid(!fempty), .cand_x(qx), .cand_y(qy), .cand_scale(qs),
    .cand_d2(qd2), .cand_h4(qh4),
    .ip_valid, .ip_x, .ip_y, .ip_scale);

  assign cand_seen = cv;

  logic unused_full;
  assign unused_full = ffull;
endmodule
