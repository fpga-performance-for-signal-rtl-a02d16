// tb_tanh_pwl - sweeps the argument over [-6, 6] in Q.14 plus extreme values; checks
// the piecewise-linear result bit-exactly against the reference model, against the
// real tanh within 0.011, odd symmetry and monotonicity.
module tb_tanh_pwl;
  import tb_ref_pkg::*;
  logic signed [23:0] z;
  logic signed [15:0] y;
  int checks = 0, failures = 0;
  longint prev;

  tanh_pwl #(.IN_W(24)) dut (.z, .y);

  initial begin
    prev = -100000;
    for (int v = -6 * 16384; v <= 6 * 16384; v += 37) begin
      real err;
      z = 24'(v);
      #1;
      checks++;
      if (longint'(y) != tanh_ref(v)) begin
        failures++; $display("z=%0d y=%0d expected %0d", v, y, tanh_ref(v));
      end
      err = real'(y) / 16384.0 - $tanh(real'(v) / 16384.0);
      checks++;
      if (err > 0.011 || err < -0.011) begin failures++; $display("z=%0d error %f", v, err); end
      checks++;
      if (longint'(y) < prev) begin failures++; $display("not monotonic at z=%0d", v); end
      prev = y;
    end
    for (int t = 0; t < 2000; t++) begin
      logic signed [15:0] yp;
      int v;
      v = $urandom_range(0, 200000);
      z = 24'(v); #1; yp = y;
      z = 24'(-v); #1;
      checks++;
      if (y != -yp) begin failures++; $display("not odd at %0d", v); end
    end
    z = 24'sh7fffff; #1; checks++; if (y != 16'sd16373) failures++;
    z = 24'sh800000; #1; checks++; if (y != -16'sd16373) failures++;
    z = 24'sd0;      #1; checks++; if (y != 16'sd0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
