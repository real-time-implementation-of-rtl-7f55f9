// sync_fifo: single-clock first-in first-out buffer, used between the
// interest point detector and the memory control logic and in front of the
// descriptor matcher.
//
// A circular array of DEPTH words with read and write pointers and a count.
// dout shows the oldest word whenever empty is low (first-word
// fall-through); rd_en pops it. A write while full is dropped and flagged
// on overflow for one cycle. Depths are this design's choice.
module sync_fifo #(
  parameter int WIDTH = 32,
  parameter int DEPTH = 16
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] din,
  output logic             full,
  input  logic             rd_en,
  output logic [WIDTH-1:0] dout,
  output logic             empty,
  output logic             overflow
);
  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wp, rp;
  logic [AW:0]      cnt;

  assign full  = (cnt == (AW+1)'(DEPTH));
  assign empty = (cnt == 0);
  assign dout  = mem[rp];

  logic do_wr, do_rd;
  assign do_wr = wr_en && !full;
  assign do_rd = rd_en && !empty;

  always_ff @(posedge clk) begin
    if (rst) begin
      wp <= '0; rp <= '0; cnt <= '0; overflow <= 1'b0;
    end else begin
      overflow <= wr_en && full;
      if (do_wr) begin
        mem[wp] <= din;
        wp <= (wp == AW'(DEPTH-1)) ? '0 : wp + 1'b1;
      end
      if (do_rd) rp <= (rp == AW'(DEPTH-1)) ? '0 : rp + 1'b1;
      cnt <= cnt + (AW+1)'(do_wr) - (AW+1)'(do_rd);
    end
  end

  // a read of an empty FIFO is ignored; the users never issue one
  assert property (@(posedge clk) disable iff (rst) rd_en |-> !empty);
endmodule
