// mem_ctrl: the memory control logic between the integral image stream,
// the external DDR3 memory and the descriptor extractor.
//
// Write side: every integral pixel is written to the memory at address
// {bank, row*W + col}. The bank bit toggles after the last pixel of each
// frame, so one frame is complete in one bank while the next is being
// written into the other.
// Read side: interest points (and frame markers) come from a FIFO. A point
// waits until its frame is complete (its bank differs from the bank being
// written), the descriptor extractor is idle and the descriptor FIFO has
// room; then its scale is passed to the extractor and the NB x NB integral
// samples at (x + (j-13)*s, y + (i-13)*s), i, j = 0..NB-1, clamped into
// the frame, are requested row by row, one per cycle while rd_ready is high.
// Read data (rd_valid, in request order, any latency) go straight to the
// extractor. The next point is taken once the extractor has delivered its
// descriptor. A marker is forwarded (marker_push) when the extractor is
// idle, so it reaches the descriptor FIFO behind every descriptor of its
// frame. The original design names this block and its role; the bank scheme, the
// sampling grid and the handshake are this design's.
module mem_ctrl
  import surf_pkg::*;
#(
  parameter int W  = 800,
  parameter int H  = 600,
  parameter int NB = 26
) (
  input  logic          clk,
  input  logic          rst,
  // integral stream in
  input  logic          ii_valid,
  input  logic [IW-1:0] ii,
  input  logic [19:0]   ii_addr,
  input  logic          ii_frame_end,
  // memory write port
  output logic          wr_en,
  output logic [20:0]   wr_addr,
  output logic [IW-1:0] wr_data,
  output logic          wr_bank,
  // memory read port
  output logic          rd_req,
  output logic [20:0]   rd_addr,
  input  logic          rd_ready,
  input  logic          rd_valid,
  input  logic [IW-1:0] rd_data,
  // interest point FIFO
  input  logic          ip_empty,
  input  ip_t           ip_head,
  output logic          ip_pop,
  // descriptor extractor
  output logic          ext_start,
  output logic [1:0]    ext_scale,
  output logic          nb_valid,
  output logic [IW-1:0] nb_data,
  input  logic          ext_busy,
  input  logic          ext_done,
  // descriptor FIFO
  input  logic          dfifo_full,
  output logic          marker_push
);
  localparam int HALF = NB / 2;

  // write side
  always_ff @(posedge clk) begin
    if (rst) begin
      wr_en <= 1'b0; wr_addr <= '0; wr_data <= '0; wr_bank <= 1'b0;
    end else begin
      wr_en   <= ii_valid;
      wr_addr <= {wr_bank, ii_addr};
      wr_data <= ii;
      if (ii_frame_end) wr_bank <= ~wr_bank;
    end
  end

  // read side
  typedef enum logic [1:0] {R_IDLE, R_FETCH, R_WAIT} rstate_t;
  rstate_t    rs;
  ip_t        cur;
  logic [4:0] fi, fj;

  int sx, sy, s;
  always_comb begin
    s  = scale_px(cur.scale);
    sx = int'(cur.x) + (int'(fj) - HALF) * s;
    sy = int'(cur.y) + (int'(fi) - HALF) * s;
    if (sx < 0) sx = 0;
    if (sx > W - 1) sx = W - 1;
    if (sy < 0) sy = 0;
    if (sy > H - 1) sy = H - 1;
  end

  logic take_ip, take_marker;
  always_comb begin
    take_marker = rs == R_IDLE && !ip_empty && ip_head.marker && !ext_busy && !dfifo_full;
    take_ip     = rs == R_IDLE && !ip_empty && !ip_head.marker && ip_head.bank != wr_bank &&
                  !ext_busy && !dfifo_full;
  end

  assign ip_pop      = take_marker || take_ip;
  assign marker_push = take_marker;
  assign ext_start   = take_ip;
  assign ext_scale   = ip_head.scale;
  assign nb_valid    = rd_valid;
  assign nb_data     = rd_data;

  always_ff @(posedge clk) begin
    if (rst) begin
      rs <= R_IDLE; cur <= '0; fi <= '0; fj <= '0; rd_req <= 1'b0; rd_addr <= '0;
    end else begin
      case (rs)
        R_IDLE: begin
          rd_req <= 1'b0;
          if (take_ip) begin
            cur <= ip_head; fi <= '0; fj <= '0; rs <= R_FETCH;
          end
        end
        R_FETCH: begin
          if (!rd_req || rd_ready) begin
            rd_req  <= 1'b1;
            rd_addr <= {cur.bank, 20'(sy * W + sx)};
            if (fj == 5'(NB - 1)) begin
              fj <= '0;
              fi <= fi + 1'b1;
              if (fi == 5'(NB - 1)) rs <= R_WAIT;
            end else fj <= fj + 1'b1;
          end
        end
        R_WAIT: begin
          if (rd_ready) rd_req <= 1'b0;
          if (ext_done) rs <= R_IDLE;
        end
        default: rs <= R_IDLE;
      endcase
    end
  end
endmodule
