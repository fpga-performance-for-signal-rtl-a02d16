// tb_of_core - Optimal Filtering core: random windows and ideal pulses (reference shape
// times an amplitude, plus a pedestal), in both gains. Checks the amplitude against the
// reference model bit-exactly, checks that an ideal pulse of amplitude A gives A within
// 2 counts whatever the pedestal, and checks that the result appears exactly two clock
// edges after the edge that sampled start.
module tb_of_core;
  import tilecal_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, use_lg = 0;
  logic [OF_N-1:0][ADC_W-1:0] win;
  amp_t amp;
  logic amp_lg, done;
  int checks = 0, failures = 0;

  of_core dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      int y [OF_N];
      int a_true, ped;
      longint exp;
      bit ideal;
      ideal = (t % 2 == 0);
      a_true = $urandom_range(0, 3800);
      ped = $urandom_range(20, 200);
      for (int i = 0; i < int'(OF_N); i++) begin
        if (ideal) y[i] = ped + $rtoi(real'(a_true) * pulse_shape(i - 3) + 0.5);
        else       y[i] = $urandom_range(0, 4095);
        if (y[i] > 4095) y[i] = 4095;
        win[i] = ADC_W'(y[i]);
      end
      use_lg = ($urandom_range(0, 3) == 0);
      exp = of_ref(y, use_lg);
      start = 1;
      @(negedge clk);
      start = 0;
      for (int e = 1; e <= 3; e++) begin
        @(negedge clk);
        win = '0;                        // held for one multiply-accumulate cycle only
        checks++;
        if (done != (e == 2)) begin failures++; $display("done=%0d at edge %0d", done, e); end
      end
      checks++;
      if (longint'(amp) != exp || amp_lg != use_lg) begin
        failures++; $display("t=%0d amp %0d expected %0d", t, amp, exp);
      end
      if (ideal && a_true + ped < 4000) begin
        longint want;
        want = use_lg ? longint'(a_true) * 40 : longint'(a_true);
        checks++;
        if (longint'(amp) > want + (use_lg ? 80 : 2) || longint'(amp) < want - (use_lg ? 80 : 2)) begin
          failures++; $display("ideal pulse A=%0d gave %0d", a_true, amp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
