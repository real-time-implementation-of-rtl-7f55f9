// seq_divider: unsigned restoring divider producing one quotient bit per
// cycle, used for the reciprocal of the descriptor norm.
//
// The original design uses a pipelined vendor divider with a latency of more than
// 50 cycles; this is a plain sequential replacement with a latency of N
// cycles, enough for one descriptor at a time. den must be below 2^(N-1)
// (the remainder then always fits N bits). start loads num and den;
// done pulses with quo valid N cycles later. Division by zero gives an
// all-ones quotient.
module seq_divider #(
  parameter int N = 64
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         start,
  input  logic [N-1:0] num,
  input  logic [N-1:0] den,
  output logic         busy,
  output logic         done,
  output logic [N-1:0] quo
);
  logic [N-1:0] d, q, rem;
  logic [$clog2(N+1)-1:0] cnt;

  logic [N:0] trial;
  assign trial = {rem, q[N-1]} - {1'b0, d};

  always_ff @(posedge clk) begin
    if (rst) begin
      busy <= 1'b0; done <= 1'b0; d <= '0; q <= '0; rem <= '0; cnt <= '0; quo <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        busy <= 1'b1; d <= den; q <= num; rem <= '0; cnt <= '0;
      end else if (busy) begin
        if (!trial[N]) begin
          rem <= trial[N-1:0];
          q   <= {q[N-2:0], 1'b1};
        end else begin
          rem <= {rem[N-2:0], q[N-1]};
          q   <= {q[N-2:0], 1'b0};
        end
        cnt <= cnt + 1'b1;
        if (cnt == ($clog2(N+1))'(N - 1)) begin
          busy <= 1'b0;
          done <= 1'b1;
          quo  <= (!trial[N]) ? {q[N-2:0], 1'b1} : {q[N-2:0], 1'b0};
        end
      end
    end
  end
endmodule
