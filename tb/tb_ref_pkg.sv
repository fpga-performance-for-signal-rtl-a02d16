// tb_ref_pkg - reference models used by the testbenches.
//
// Integer models of the two reconstructions, written from their definitions rather than
// from the RTL: OF is A = round(sum a_i y_i / 2^14); the SLP normalises with the
// pedestal and 1/4096, sums, applies a piecewise-linear tanh whose breakpoints are
// computed here with $tanh (not read from the design's table), and de-normalises.
// Also a pulse-shape helper for generating detector-like sample streams.
package tb_ref_pkg;
  import tilecal_pkg::*;

  localparam int SLP_PED   = 50;
  localparam int SLP_SCALE = 16384;

  function automatic longint of_ref(input int y [OF_N], input bit lg);
    longint s, r;
    s = 0;
    for (int i = 0; i < int'(OF_N); i++) s += longint'(OF_COEF[i]) * y[i];
    r = (s + 8192) >>> 14;
    return lg ? r * GAIN_RATIO : r;
  endfunction

  function automatic longint tanh_ref(input longint z);
    longint t [17];
    longint mag, m, k, f;
    for (int i = 0; i < 17; i++) t[i] = longint'($rtoi($tanh(real'(i) / 4.0) * 16384.0 + 0.5));
    mag = (z < 0) ? -z : z;
    if (mag >= 65536) m = t[16];
    else begin
      k = mag / 4096;
      f = mag % 4096;
      m = t[k] + (((t[k+1] - t[k]) * f) / 4096);
    end
    return (z < 0) ? -m : m;
  endfunction

  function automatic longint slp_ref(input int y [SLP_N], input bit lg);
    longint acc, z, yy, a;
    acc = 0;
    for (int i = 0; i < int'(SLP_N); i++) acc += longint'(SLP_COEF[i]) * ((y[i] - SLP_PED) * 4);
    z = (acc >>> 14) + longint'(SLP_BIAS);
    if (z > 8388607) z = 8388607;
    if (z < -8388607) z = -8388607;
    yy = tanh_ref(z);
    a = (yy * SLP_SCALE + 8192) >>> 14;
    return lg ? a * GAIN_RATIO : a;
  endfunction

  // Reference pulse shape at BC offset d from the peak (assumed shape, 25 ns steps).
  function automatic real pulse_shape(input int d);
    case (d)
      -2: return 0.02;
      -1: return 0.30;
       0: return 1.00;
       1: return 0.60;
       2: return 0.25;
       3: return 0.08;
       4: return 0.03;
      default: return 0.0;
    endcase
  endfunction

endpackage
