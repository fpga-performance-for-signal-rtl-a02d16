// weighted_sum - time-multiplexed multiply-accumulate: acc = sum_{i<N} x[i] * c[i].
//
// Both reconstruction algorithms reduce to a weighted sum of samples. The processing
// clock runs at ten times the bunch-crossing rate, so the N products need not be
// formed in parallel: LANES multipliers work for STEPS = ceil(N / LANES) cycles.
// LANES = N gives a one-cycle sum, LANES = 1 a single multiplier reused N times.
//
// Interface: a one-cycle start pulse clears the accumulator; x and c must then stay
// stable until done. done pulses STEPS cycles after the cycle in which start was
// sampled, with acc holding the exact (full-width) sum; acc holds until the next start.
// A start while busy restarts the sum (the owner must not do that; an assertion says so).
// The weighted sum is the reconstruction's own formula; the lane count and the
// handshake are this design's choices.
module weighted_sum #(
  parameter int unsigned N     = 9,
  parameter int unsigned LANES = 1,
  parameter int unsigned X_W   = 18,   // input width, signed
  parameter int unsigned C_W   = 18,   // coefficient width, signed
  parameter int unsigned ACC_W = 42    // accumulator width, signed
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  input  logic [N-1:0][X_W-1:0] x,
  input  logic [N-1:0][C_W-1:0] c,
  output logic                  busy,
  output logic                  done,
  output logic signed [ACC_W-1:0] acc
);

  localparam int unsigned STEPS  = (N + LANES - 1) / LANES;
  localparam int unsigned STEP_W = (STEPS > 1) ? $clog2(STEPS) : 1;

  logic [STEP_W-1:0]       step;
  logic signed [ACC_W-1:0] lane_sum;

  // Sum of the LANES products handled in the current step.
  always_comb begin
    lane_sum = '0;
    for (int l = 0; l < int'(LANES); l++) begin
      int idx;
      idx = int'(step) * int'(LANES) + l;
      if (idx < int'(N))
        lane_sum = lane_sum + ACC_W'($signed(x[idx]) * $signed(c[idx]));
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy <= 1'b0;
      done <= 1'b0;
      step <= '0;
      acc  <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        busy <= 1'b1;
        step <= '0;
        acc  <= '0;
      end else if (busy) begin
        acc <= acc + lane_sum;
        if (step == STEP_W'(STEPS - 1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end else begin
          step <= step + 1'b1;
        end
      end
    end
  end

  a_no_restart: assert property (@(posedge clk) disable iff (!rst_n) start |-> !busy)
    else $error("weighted_sum: start while a sum is in progress");

endmodule
