// of_core - Optimal Filtering amplitude, A = sum_{i=0}^{N-1} a_i * y_i.
//
// Runs in the 400 MHz processing domain. On start it takes the window of N raw ADC
// samples y_i (held stable by the 40 MHz side) and the gain flag, forms the weighted
// sum with the Q.14 weights a_i in LANES parallel multipliers, rounds the result to
// whole ADC counts and multiplies it by the gain ratio (40) when the window came from
// the low-gain path. The weights sum to zero, so a constant pedestal drops out.
//
// Timing: with LANES = N the amplitude register changes two cycles after the cycle in
// which start is sampled (one cycle of multiply-accumulate, one of rounding and gain
// scaling); done pulses in that same cycle. amp and amp_lg hold until the next result.
// The formula and the 7-sample window follow the reconstruction scheme; the weights
// (see tilecal_pkg), rounding and lane count are this design's choices. Only the
// amplitude is reconstructed, not the pulse phase.
module of_core
  import tilecal_pkg::*;
#(
  parameter int unsigned N     = OF_N,
  parameter int unsigned LANES = OF_N,
  parameter coef_t       COEF [N] = OF_COEF
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start,
  input  logic [N-1:0][ADC_W-1:0] win,
  input  logic                    use_lg,
  output amp_t                    amp,
  output logic                    amp_lg,
  output logic                    done
);

  localparam int unsigned X_W   = ADC_W + 1;
  localparam int unsigned ACC_W = X_W + COEF_W + $clog2(N) + 1;

  logic [N-1:0][X_W-1:0]    x;
  logic [N-1:0][COEF_W-1:0] c;
  logic                     ws_done;
  logic signed [ACC_W-1:0]  acc;
  logic                     lg_q;
  logic signed [ACC_W-1:0]  rounded;
  amp_t                     amp_hg;

  always_comb begin
    for (int i = 0; i < int'(N); i++) begin
      x[i] = {1'b0, win[i]};     // samples are unsigned
      c[i] = COEF[i];
    end
  end

  weighted_sum #(.N(N), .LANES(LANES), .X_W(X_W), .C_W(COEF_W), .ACC_W(ACC_W)) u_sum (
    .clk, .rst_n, .start, .x, .c, .busy(), .done(ws_done), .acc
  );

  // Round half up from Q.14 to whole counts.
  assign rounded = (acc + ACC_W'(1 << (FRAC_W - 1))) >>> FRAC_W;
  assign amp_hg  = AMP_W'(rounded);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      lg_q   <= 1'b0;
      amp    <= '0;
      amp_lg <= 1'b0;
      done   <= 1'b0;
    end else begin
      done <= ws_done;
      if (start) lg_q <= use_lg;
      if (ws_done) begin
        amp    <= lg_q ? amp_t'(amp_hg * AMP_W'(GAIN_RATIO)) : amp_hg;
        amp_lg <= lg_q;
      end
    end
  end

endmodule
