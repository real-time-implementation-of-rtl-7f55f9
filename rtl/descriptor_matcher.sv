// descriptor_matcher: compares the descriptors of a frame with the library
// and decides once per frame whether the object is present.
//
// For each incoming descriptor the library is read eight elements per cycle
// (library_rom); the distance to library descriptor d is the sum of
// absolute element differences, built over 8 cycles, so a descriptor takes
// NLIB*8 cycles (+1 for the ROM latency). A vector of NLIB running minima
// keeps, for every library descriptor, the smallest distance seen in the
// frame. A frame marker starts the decision: the NLIB minima are scanned
// into a sorted list of the NBEST smallest (insertion, one per cycle), their
// sum is formed and compared with THRESH; det_valid pulses with detected =
// (sum < THRESH) and the minima are reset. The distance rule, the 128/8/30
// sizes and the sort-and-sum decision follow the original design; the threshold
// value, the L1 distance and the insertion sort are this design's choices.
// Interface: in_valid/in_marker/in_desc with in_ready (pops the FIFO
// feeding it). Timing: NLIB*8+2 cycles per descriptor, NLIB+3 per decision.
module descriptor_matcher
  import surf_pkg::*;
#(
  parameter int          NLIB     = 128,
  parameter int          NROM     = 8,
  parameter int          NBEST    = 30,
  parameter logic [63:0] THRESH   = 64'd8053063680,
  parameter string       LIB_FILE = ""
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         in_valid,
  input  logic         in_marker,
  input  delem_t       in_desc [DLEN],
  output logic         in_ready,
  output logic         det_valid,
  output logic         detected,
  output logic [63:0]  det_sum,
  output logic [15:0]  desc_count
);
  localparam int STEPS = DLEN / NROM;
  localparam int AW    = $clog2(NLIB * STEPS);
  // "no distance yet": above any L1 distance (64 * 2^49) and small enough
  // that the sum of NBEST of them cannot wrap
  localparam logic [63:0] NONE = 64'h00FF_FFFF_FFFF_FFFF;

  typedef enum logic [2:0] {S_IDLE, S_MATCH, S_SORT, S_SUM, S_OUT} state_t;
  state_t state;

  delem_t       cur [DLEN];
  logic [AW-1:0] addr;
  logic          iss;         // addresses still to issue
  logic          rd_v;        // ROM data of addr_q is valid
  logic [AW-1:0] addr_q;
  delem_t        q [NROM];
  logic [63:0]   acc;
  logic [63:0]   mind [NLIB];
  logic [63:0]   best [NBEST];
  logic [$clog2(NLIB+1)-1:0] si;
  logic [$clog2(NLIB)-1:0]   dsel;

  library_rom #(.NLIB(NLIB), .NROM(NROM), .LIB_FILE(LIB_FILE)) u_rom (.clk, .addr, .q);

  // partial distance of the eight elements that arrive this cycle
  logic [63:0] part;
  logic [2:0]  t_q;
  always_comb begin
    t_q  = 3'(addr_q % STEPS);
    part = '0;
    for (int b = 0; b < NROM; b++) begin
      logic signed [DW:0] df;
      df   = (DW+1)'(cur[int'(t_q) * NROM + b]) - (DW+1)'(q[b]);
      part = part + 64'((df < 0) ? -df : df);
    end
  end

  // insertion of mind[si] into the sorted list
  logic [63:0] ins, best_n [NBEST];
  always_comb begin
    ins = mind[dsel];
    for (int i = 0; i < NBEST; i++) begin
      if (ins < best[i])
        best_n[i] = (i == 0 || ins >= best[i-1]) ? ins : best[i-1];
      else
        best_n[i] = best[i];
    end
  end

  logic [63:0] sum_c;
  always_comb begin
    sum_c = '0;
    for (int i = 0; i < NBEST; i++) sum_c = sum_c + best[i];
  end

  assign in_ready = (state == S_IDLE);
  assign dsel     = si[$clog2(NLIB)-1:0];

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_IDLE; addr <= '0; addr_q <= '0; rd_v <= 1'b0; iss <= 1'b0; acc <= '0; si <= '0;
      det_valid <= 1'b0; detected <= 1'b0; det_sum <= '0; desc_count <= '0;
      for (int i = 0; i < NLIB; i++) mind[i] <= NONE;
      for (int i = 0; i < NBEST; i++) best[i] <= NONE;
      for (int i = 0; i < DLEN; i++) cur[i] <= '0;
    end else begin
      det_valid <= 1'b0;
      case (state)
        S_IDLE: begin
          if (in_valid) begin
            if (in_marker) begin
              state <= S_SORT; si <= '0;
              for (int i = 0; i < NBEST; i++) best[i] <= NONE;
            end else begin
              cur <= in_desc; addr <= '0; iss <= 1'b1; rd_v <= 1'b0; acc <= '0;
              desc_count <= desc_count + 1'b1;
              state <= S_MATCH;
            end
          end
        end
        S_MATCH: begin
          // issue addresses while iss; accumulate the data of addr_q
          if (iss) begin
            addr <= addr + 1'b1;
            if (addr == AW'(NLIB * STEPS - 1)) iss <= 1'b0;
          end
          rd_v   <= iss;
          addr_q <= addr;
          if (rd_v) begin
            if (int'(t_q) == 0) acc <= part; else acc <= acc + part;
            if (int'(t_q) == STEPS - 1) begin
              if (acc + part < mind[addr_q / AW'(STEPS)]) mind[addr_q / AW'(STEPS)] <= acc + part;
              if (addr_q == AW'(NLIB * STEPS - 1)) state <= S_IDLE;
            end
          end
        end
        S_SORT: begin
          best <= best_n;
          mind[dsel] <= NONE;
          si <= si + 1'b1;
          if (si == ($clog2(NLIB+1))'(NLIB - 1)) state <= S_SUM;
        end
        S_SUM: begin
          det_sum <= sum_c;
          state   <= S_OUT;
        end
        S_OUT: begin
          det_valid <= 1'b1;
          detected  <= det_sum < THRESH;
          state     <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
