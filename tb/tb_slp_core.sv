// tb_slp_core - perceptron core: random windows and pulse-like windows in both gains,
// started back to back every 10 cycles (one bunch crossing at the 400 MHz clock).
// Checks each amplitude bit-exactly against the reference model and checks that it
// appears exactly 13 clock edges after the edge that sampled start, while the next
// window is already being processed.
module tb_slp_core;
  import tilecal_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, use_lg = 0;
  logic [SLP_N-1:0][ADC_W-1:0] win;
  amp_t amp;
  logic amp_lg, done;
  int checks = 0, failures = 0;
  int cyc = 0;
  longint exp_amp [$];
  bit     exp_lg  [$];
  int     exp_cyc [$];
  int     n_lg = 0, n_big = 0;

  slp_core dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (rst_n) begin
    if (done) begin
      checks++;
      if (exp_cyc.size() == 0 || exp_cyc[0] != cyc) begin
        failures++; $display("unexpected done at %0d", cyc);
      end else begin
        checks++;
        if (longint'(amp) != exp_amp[0] || amp_lg != exp_lg[0]) begin
          failures++; $display("amp %0d expected %0d", amp, exp_amp[0]);
        end
        void'(exp_cyc.pop_front()); void'(exp_amp.pop_front()); void'(exp_lg.pop_front());
      end
    end else if (exp_cyc.size() != 0 && exp_cyc[0] == cyc) begin
      checks++; failures++; $display("missing result at %0d", cyc);
      void'(exp_cyc.pop_front()); void'(exp_amp.pop_front()); void'(exp_lg.pop_front());
    end
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 1500; t++) begin
      int y [SLP_N];
      int a_true;
      a_true = $urandom_range(0, 4000);
      for (int i = 0; i < int'(SLP_N); i++) begin
        if (t % 3 == 0) y[i] = $urandom_range(0, 4095);
        else            y[i] = 50 + $rtoi(real'(a_true) * pulse_shape(i - 4) + 0.5);
        if (y[i] > 4095) y[i] = 4095;
        win[i] = ADC_W'(y[i]);
      end
      use_lg = ($urandom_range(0, 3) == 0);
      n_lg += use_lg;
      start = 1;
      @(negedge clk);                       // start sampled at edge number cyc
      exp_amp.push_back(slp_ref(y, use_lg));
      exp_lg.push_back(use_lg);
      exp_cyc.push_back(cyc + 13);          // 13 edges after the sampling edge
      if (slp_ref(y, 0) > 3000) n_big++;
      start = 0;
      repeat (9) @(negedge clk);
    end
    repeat (20) @(negedge clk);
    checks++;
    if (exp_cyc.size() != 0) begin failures++; $display("results missing at end"); end
    checks++;
    if (n_lg == 0 || n_big == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
