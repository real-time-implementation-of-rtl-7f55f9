// wavelet_reconstructor: distributes the 24x24 Haar response stream over
// the 16 overlapping 9x9 sub-regions A..P of the descriptor window and acts
// as the Gaussian mask controller: for every response it gives, per
// sub-region, a valid flag and the response's row and column inside that
// sub-region (the address into the 9x9 Gaussian mask).
//
// Two counters track the row and column of the response. Sub-region
// k = 4*R + C covers rows 5R..5R+8 and columns 5C..5C+8, so neighbouring
// sub-regions share a band of 4 samples and a response belongs to one, two
// or four of them. The 9x9 size and the 4x4 arrangement follow the
// original design; the step of 5 is the one that fits 4 such squares in 24. The
// membership is decoded from the counters rather than by an explicit state
// machine. Timing: outputs registered, one cycle after the input; last marks
// the final response of the window. start clears the counters.
module wavelet_reconstructor
  import surf_pkg::*;
#(
  parameter int NR   = 24,
  parameter int SUB  = 9,
  parameter int STEP = 5
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 start,
  input  logic                 in_valid,
  input  logic signed [RW-1:0] in_dx,
  input  logic signed [RW-1:0] in_dy,
  output logic [NSUB-1:0]      port_valid,
  output logic [3:0]           lr [NSUB],
  output logic [3:0]           lc [NSUB],
  output logic signed [RW-1:0] dx,
  output logic signed [RW-1:0] dy,
  output logic                 last
);
  logic [4:0] rr, cc;

  always_ff @(posedge clk) begin
    if (rst || start) begin
      rr <= '0; cc <= '0; port_valid <= '0; dx <= '0; dy <= '0; last <= 1'b0;
      for (int k = 0; k < NSUB; k++) begin lr[k] <= '0; lc[k] <= '0; end
    end else begin
      port_valid <= '0;
      last       <= 1'b0;
      if (in_valid) begin
        dx   <= in_dx;
        dy   <= in_dy;
        last <= (rr == 5'(NR - 1)) && (cc == 5'(NR - 1));
        for (int k = 0; k < NSUB; k++) begin
          int r0, c0;
          r0 = (k / 4) * STEP;
          c0 = (k % 4) * STEP;
          port_valid[k] <= int'(rr) >= r0 && int'(rr) < r0 + SUB &&
                           int'(cc) >= c0 && int'(cc) < c0 + SUB;
          lr[k] <= 4'(int'(rr) - r0);
          lc[k] <= 4'(int'(cc) - c0);
        end
        if (cc == 5'(NR - 1)) begin
          cc <= '0; rr <= rr + 1'b1;
        end else cc <= cc + 1'b1;
      end
    end
  end
endmodule
