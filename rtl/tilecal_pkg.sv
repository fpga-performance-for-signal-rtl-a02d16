// tilecal_pkg - shared types and constants of the TileCal amplitude reconstruction.
//
// Sample format: the upgraded front-end delivers 12-bit ADC samples at 40 MHz, one per
// bunch crossing (BC), in two gains, high gain (HG) and low gain (LG), whose ratio is 40.
// Fixed point: coefficients and normalised values use FRAC_W = 14 fractional bits
// ("Q.14"). The widths of the fixed-point numbers are this design's choice; the sample
// width, gain ratio and window lengths follow the reconstruction scheme.
//
// Coefficients (this design's defaults, to be replaced by calibrated / trained values):
//  * OF weights a_i for an assumed reference pulse g sampled at -75..+75 ns in 25 ns
//    steps, g = (0, 0.02, 0.30, 1.00, 0.60, 0.25, 0.08), with white noise and the
//    pedestal-free constraint:  a_i = (g_i - mean(g)) / sum_j (g_j - mean(g))^2,
//    rounded to Q.14 and trimmed so that sum(a_i) = 0 (the pedestal cancels) and
//    sum(a_i g_i) = 1 (unit gain on the reference shape).
//  * SLP weights: the same formula on the 9-sample shape
//    (0, 0, 0.02, 0.30, 1.00, 0.60, 0.25, 0.08, 0.03), scaled by 0.25, bias 0.
//  * TANH_TAB[k] = round(tanh(k/4) * 2^14), k = 0..16: breakpoints of the
//    piecewise-linear tanh.
package tilecal_pkg;

  localparam int unsigned ADC_W      = 12;   // ADC sample width
  localparam int unsigned GAIN_RATIO = 40;   // HG / LG gain ratio
  localparam int unsigned OF_N       = 7;    // OF window length
  localparam int unsigned SLP_N      = 9;    // SLP window length
  localparam int unsigned FRAC_W     = 14;   // fractional bits of Q.14 numbers
  localparam int unsigned COEF_W     = 18;   // coefficient width (signed)
  localparam int unsigned AMP_W      = 24;   // reconstructed amplitude width (signed)
  localparam int unsigned HG_SAT     = 4095; // HG sample counted as saturated at or above

  typedef logic [ADC_W-1:0]         sample_t;
  typedef logic signed [COEF_W-1:0] coef_t;
  typedef logic signed [AMP_W-1:0]  amp_t;

  // Result handed from the 400 MHz domain to the 40 MHz domain.
  typedef struct packed {
    logic  lg;    // amplitude was reconstructed from the LG samples
    amp_t  amp;   // amplitude in HG ADC counts
  } result_t;

  localparam coef_t OF_COEF [OF_N] = '{
    -18'sd6615, -18'sd6204, -18'sd441, 18'sd13965, 18'sd5733, -18'sd1470, -18'sd4968
  };

  localparam coef_t SLP_COEF [SLP_N] = '{
    -18'sd1101, -18'sd1101, -18'sd1014, 18'sd203, 18'sd3245, 18'sd1506, -18'sd14,
    -18'sd753, -18'sd971
  };

  localparam logic signed [31:0] SLP_BIAS = 32'sd0;   // Q.14

  localparam logic [FRAC_W:0] TANH_TAB [17] = '{
    15'd0,     15'd4013,  15'd7571,  15'd10406, 15'd12478, 15'd13898,
    15'd14830, 15'd15423, 15'd15795, 15'd16024, 15'd16165, 15'd16251,
    15'd16303, 15'd16335, 15'd16354, 15'd16366, 15'd16373
  };

endpackage
