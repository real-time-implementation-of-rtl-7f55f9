// video_pos_gen: the address generator of the video input. It recovers the
// column and row of every valid pixel from the sync signals and forms the
// linear pixel address used for frame storage.
//
// vsync high clears the counters; each pixel with de high takes the current
// column and row, and a falling edge of de ends a line. The outputs are
// registered, one cycle after the input pixel, so they line up with the
// registered gray value of rgb2gray. frame_end marks the pixel (W-1, H-1).
// Active-high syncs and the counting scheme are this design's choice: the
// original design only says position is derived from vsync, hsync and de.
module video_pos_gen #(
  parameter int W = 800,
  parameter int H = 600
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        vsync,
  input  logic        hsync,
  input  logic        de,
  output logic        valid,
  output logic [9:0]  col,
  output logic [9:0]  row,
  output logic [19:0] addr,
  output logic        frame_start,
  output logic        frame_end
);
  logic [9:0]  ccnt, rcnt;
  logic [19:0] acnt;
  logic        de_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      ccnt <= '0; rcnt <= '0; acnt <= '0; de_q <= 1'b0;
      valid <= 1'b0; col <= '0; row <= '0; addr <= '0;
      frame_start <= 1'b0; frame_end <= 1'b0;
    end else begin
      de_q        <= de;
      valid       <= de;
      col         <= ccnt;
      row         <= rcnt;
      addr        <= acnt;
      frame_start <= de && ccnt == 0 && rcnt == 0;
      frame_end   <= de && ccnt == 10'(W-1) && rcnt == 10'(H-1);
      if (vsync) begin
        ccnt <= '0; rcnt <= '0; acnt <= '0;
      end else if (de) begin
        ccnt <= ccnt + 1'b1;
        acnt <= acnt + 1'b1;
      end else if (de_q) begin
        ccnt <= '0;
        rcnt <= rcnt + 1'b1;
      end
    end
  end

  // hsync carries no information beyond de in this scheme
  logic unused_hsync;
  assign unused_hsync = hsync;
endmodule
