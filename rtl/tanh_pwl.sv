// tanh_pwl - piecewise-linear hyperbolic tangent in Q.14 fixed point.
//
// The perceptron's activation. The magnitude |z| is split into 16 segments of width
// 0.25 on [0, 4); inside segment k the output is interpolated linearly between the
// table points T[k] = round(tanh(k/4) * 2^14) and T[k+1] (tilecal_pkg::TANH_TAB).
// At and above |z| = 4 the output stays at T[16] = tanh(4). tanh is odd, so negative
// arguments give the negated result. The largest error against tanh is about 0.01
// (in the first segment, where the curvature is largest).
// A piecewise-linear tanh is the reconstruction's choice; the segment count and width
// are this design's. Purely combinational: the caller registers the result.
module tanh_pwl
  import tilecal_pkg::*;
#(
  parameter int unsigned IN_W = 24          // argument width, signed Q.14
) (
  input  logic signed [IN_W-1:0]     z,
  output logic signed [FRAC_W+1:0]   y      // tanh(z), signed Q.14
);

  localparam int unsigned SEG_W = FRAC_W - 2;   // fraction bits inside a 0.25 segment

  logic [IN_W-1:0]   mag;
  logic [4:0]        k;
  logic [SEG_W-1:0]  f;
  logic [FRAC_W:0]   t0, t1, m;
  logic [FRAC_W+SEG_W:0] interp;

  always_comb begin
    mag = z[IN_W-1] ? IN_W'(-z) : IN_W'(z);
    k   = {1'b0, mag[FRAC_W+1:SEG_W]};
    f   = mag[SEG_W-1:0];
    t0  = TANH_TAB[k];
    t1  = TANH_TAB[k + 5'd1];
    interp = (FRAC_W+SEG_W+1)'(t1 - t0) * (FRAC_W+SEG_W+1)'(f);
    if (mag >= IN_W'(4 << FRAC_W))
      m = TANH_TAB[16];
    else
      m = t0 + (FRAC_W+1)'(interp >> SEG_W);
    y = z[IN_W-1] ? -$signed({1'b0, m}) : $signed({1'b0, m});
  end

endmodule
