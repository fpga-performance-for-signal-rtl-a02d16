// slp_core - Single Layer Perceptron amplitude reconstruction.
//
// Runs in the 400 MHz processing domain, as a pipeline started once per bunch crossing:
//   1. normalise: x_n[i] = (win[i] - PED) / 2^ADC_W, in Q.14 (a subtraction and a shift),
//      captured on start together with the gain flag;
//   2. one weight layer: z = sum_i w[i] * x_n[i] + BIAS, in weighted_sum with LANES
//      multipliers (LANES = 1: one multiplier used nine times), scaled back to Q.14 and
//      saturated to the tanh input width;
//   3. activation: y = tanh(z), piecewise linear (tanh_pwl), registered;
//   4. de-normalise: amp = round(y * OUT_SCALE) + OUT_OFFSET in ADC counts, times the
//      gain ratio when the window came from the low-gain path.
// Timing: with N = 9 and LANES = 1 the amplitude register changes 13 cycles after the
// clock edge at which start is sampled (1 normalise, 9 multiply-accumulate, 1 scaling
// of z, 1 activation, 1 output); done pulses then. The multiply-accumulate is busy 9 of every 10 cycles, so
// one window per bunch crossing is sustained.
// The window length, the single weight layer, the piecewise-linear tanh, fixed-point
// arithmetic and the (de)normalisation stages follow the reconstruction scheme. The
// constants (weights, bias, PED, OUT_SCALE, OUT_OFFSET), the Q.14 format and the lane
// count are this design's placeholders for trained values.
module slp_core
  import tilecal_pkg::*;
#(
  parameter int unsigned        N          = SLP_N,
  parameter int unsigned        LANES      = 1,
  parameter coef_t              COEF [N]   = SLP_COEF,
  parameter logic signed [31:0] BIAS       = SLP_BIAS,   // Q.14
  parameter int unsigned        PED        = 50,         // pedestal, ADC counts
  parameter int                 OUT_SCALE  = 16384,      // ADC counts per unit of y
  parameter int                 OUT_OFFSET = 0           // ADC counts
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

  localparam int unsigned X_W   = FRAC_W + 4;                       // signed Q.14, |x_n| < 4
  localparam int unsigned ACC_W = X_W + COEF_W + $clog2(N) + 1;
  localparam int unsigned Z_W   = 24;                               // tanh argument width
  localparam int signed   Z_MAX = (1 << (Z_W - 1)) - 1;

  logic [N-1:0][X_W-1:0]    xn;
  logic [N-1:0][COEF_W-1:0] c;
  logic                     lg_q, lg_s, lg_z, lg_y, ws_start, ws_done, z_vld, y_vld;
  logic signed [ACC_W-1:0]  acc, zfull;
  logic signed [Z_W-1:0]    z_q;
  logic signed [FRAC_W+1:0] y, y_q;
  logic signed [63:0]       scaled;
  amp_t                     amp_hg;

  always_comb
    for (int i = 0; i < int'(N); i++) c[i] = COEF[i];

  // Stage 1: normalisation.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      xn       <= '0;
      lg_q     <= 1'b0;
      lg_s     <= 1'b0;
      ws_start <= 1'b0;
    end else begin
      ws_start <= start;
      if (ws_start) lg_s <= lg_q;   // the gain flag travels with its window
      if (start) begin
        lg_q <= use_lg;
        for (int i = 0; i < int'(N); i++)
          xn[i] <= X_W'(($signed(X_W'(win[i])) - $signed(X_W'(PED)))
                        <<< (FRAC_W - ADC_W));
      end
    end
  end

  // Stage 2: weight layer.
  weighted_sum #(.N(N), .LANES(LANES), .X_W(X_W), .C_W(COEF_W), .ACC_W(ACC_W)) u_sum (
    .clk, .rst_n, .start(ws_start), .x(xn), .c, .busy(), .done(ws_done), .acc
  );

  assign zfull = (acc >>> FRAC_W) + ACC_W'(BIAS);

  // Stage 3: activation.
  tanh_pwl #(.IN_W(Z_W)) u_tanh (.z(z_q), .y);

  // Stage 4: de-normalisation and gain conversion.
  assign scaled = (64'(y_q) * 64'(OUT_SCALE) + 64'(1 << (FRAC_W - 1))) >>> FRAC_W;
  assign amp_hg = AMP_W'(scaled + 64'(OUT_OFFSET));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      z_q    <= '0;
      z_vld  <= 1'b0;
      lg_z   <= 1'b0;
      lg_y   <= 1'b0;
      y_q    <= '0;
      y_vld  <= 1'b0;
      amp    <= '0;
      amp_lg <= 1'b0;
      done   <= 1'b0;
    end else begin
      z_vld <= ws_done;
      y_vld <= z_vld;
      done  <= y_vld;
      if (ws_done) begin
        lg_z <= lg_s;
        if (zfull > ACC_W'(Z_MAX))       z_q <= Z_W'(Z_MAX);
        else if (zfull < -ACC_W'(Z_MAX)) z_q <= -Z_W'(Z_MAX);
        else                             z_q <= Z_W'(zfull);
      end
      if (z_vld) begin
        y_q  <= y;
        lg_y <= lg_z;
      end
      if (y_vld) begin
        amp    <= lg_y ? amp_t'(amp_hg * AMP_W'(GAIN_RATIO)) : amp_hg;
        amp_lg <= lg_y;
      end
    end
  end

endmodule
