// diff_tracker: moving-object detector for a fixed camera. Each frame is
// compared pixel by pixel with the previous frame held in a ping-pong frame
// buffer; pixels that changed by at least a threshold are highlighted in the
// output video.
//
// Pipeline (4 cycles, the latency the original design gives, input registers
// included): 1) input registers for pixel and sync signals, 2) rgb2gray and
// the address controller (video_pos_gen), 3) ping-pong buffer read of the
// previous frame at the same address while the current gray pixel is
// written and also held in a register, 4) diff_compare. The sync signals
// travel through a matching 4-stage delay line. The structure follows the
// original design's block diagram. The buffer is not reset, so the first frame
// is compared with whatever the unwritten half holds.
// Interface: video in (rgb, vsync, hsync, de), video out with the same
// signals four cycles later; moving flags a highlighted pixel.
module diff_tracker #(
  parameter int W      = 800,
  parameter int H      = 600,
  parameter int THRESH = 30
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [23:0] rgb,
  input  logic        vsync,
  input  logic        hsync,
  input  logic        de,
  output logic [23:0] out_rgb,
  output logic        out_vsync,
  output logic        out_hsync,
  output logic        out_de,
  output logic        moving
);
  logic [23:0] rgb_r;
  logic [2:0]  ctl_r;
  logic [2:0]  ctl_d [3];

  always_ff @(posedge clk) begin
    if (rst) begin
      rgb_r <= '0; ctl_r <= '0;
      for (int i = 0; i < 3; i++) ctl_d[i] <= '0;
    end else begin
      rgb_r    <= rgb;
      ctl_r    <= {vsync, hsync, de};
      ctl_d[0] <= ctl_r;
      ctl_d[1] <= ctl_d[0];
      ctl_d[2] <= ctl_d[1];
    end
  end
  assign {out_vsync, out_hsync, out_de} = ctl_d[2];

  logic [7:0]  gray, gray_q, prev;
  logic        pv, fs, fe;
  logic [9:0]  pc, pr;
  logic [19:0] pa;

  rgb2gray u_gray (.clk, .rgb(rgb_r), .gray);

  video_pos_gen #(.W(W), .H(H)) u_addr (
    .clk, .rst, .vsync(ctl_r[2]), .hsync(ctl_r[1]), .de(ctl_r[0]),
    .valid(pv), .col(pc), .row(pr), .addr(pa), .frame_start(fs), .frame_end(fe));

  logic part;
  pingpong_buffer #(.W(W), .H(H), .DW(8)) u_pp (
    .clk, .rst, .we(pv), .addr(pa), .wdata(gray), .frame_end(fe), .rdata(prev), .part);

  always_ff @(posedge clk) gray_q <= gray;

  diff_compare #(.THRESH(THRESH)) u_cmp (.clk, .cur(gray_q), .prev, .rgb_out(out_rgb), .moving);

  logic unused;
  assign unused = fs ^ part ^ (|pc) ^ (|pr);
endmodule
