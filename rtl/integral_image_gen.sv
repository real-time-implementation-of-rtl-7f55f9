// integral_image_gen: the entry block of the SURF pipeline. It converts the
// RGB video stream to gray, derives each pixel's position and frame address
// from the sync signals, and accumulates the integral image.
//
// rgb2gray and video_pos_gen both register once, so gray, position and
// address stay aligned; integral_image adds one more register. Output:
// one 28-bit integral pixel per input pixel, two cycles after it, with its
// column, row and linear address (row*W+col), and a frame_end pulse on the
// last pixel of the frame. The structure follows the original design's block
// diagram.
module integral_image_gen #(
  parameter int W = 800,
  parameter int H = 600
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic [23:0]              rgb,
  input  logic                     vsync,
  input  logic                     hsync,
  input  logic                     de,
  output logic                     ii_valid,
  output logic [surf_pkg::IW-1:0]  ii,
  output logic [9:0]               ii_col,
  output logic [9:0]               ii_row,
  output logic [19:0]              ii_addr,
  output logic                     ii_frame_end
);
  logic [7:0]  gray;
  logic        pv, fs, fe;
  logic [9:0]  pc, pr;
  logic [19:0] pa;

  rgb2gray u_gray (.clk, .rgb, .gray);

  video_pos_gen #(.W(W), .H(H)) u_pos (
    .clk, .rst, .vsync, .hsync, .de,
    .valid(pv), .col(pc), .row(pr), .addr(pa), .frame_start(fs), .frame_end(fe));

  integral_image #(.W(W), .IW(surf_pkg::IW)) u_ii (
    .clk, .rst, .valid(pv), .gray, .col(pc), .row(pr),
    .ii_valid, .ii, .ii_col, .ii_row);

  always_ff @(posedge clk) begin
    if (rst) begin
      ii_addr <= '0; ii_frame_end <= 1'b0;
    end else begin
      ii_addr      <= pa;
      ii_frame_end <= fe;
    end
  end

  logic unused_fs;
  assign unused_fs = fs;
endmodule
