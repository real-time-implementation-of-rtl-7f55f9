// pingpong_buffer: a dual-port frame memory split into two halves, "ping"
// and "pong". While the current frame is written into one half at each
// pixel's address, the previous frame is read from the other half at the
// same address, so the stored pixel comes out exactly in step with the live
// pixel at the same position. After the last pixel of a frame the halves
// swap. This is the original design's structure; swapping on the frame's last
// pixel and the one-cycle registered read are this design's choices.
// Interface: we/addr/wdata for the live pixel, frame_end on its last
// pixel; rdata is the previous frame's pixel at addr, one cycle later.
module pingpong_buffer #(
  parameter int W  = 800,
  parameter int H  = 600,
  parameter int DW = 8
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          we,
  input  logic [19:0]   addr,
  input  logic [DW-1:0] wdata,
  input  logic          frame_end,
  output logic [DW-1:0] rdata,
  output logic          part
);
  localparam int N = W * H;

  logic [DW-1:0] mem [2 * N];

  always_ff @(posedge clk) begin
    if (we && int'(addr) < N) begin
      mem[int'(part) * N + int'(addr)] <= wdata;
    end
    rdata <= (int'(addr) < N) ? mem[int'(!part) * N + int'(addr)] : '0;
  end

  always_ff @(posedge clk) begin
    if (rst) part <= 1'b0;
    else if (we && frame_end) part <= ~part;
  end
endmodule
