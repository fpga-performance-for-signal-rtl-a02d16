// tb_workload_reco - the channel reconstruction on long event samples, with and
// without pile-up, at the top's default parameters.
//
// Two runs of N_EVENTS (500 000) events each, one million in all, one event (an in-time pulse of known true
// amplitude, uniform in 0..3900 counts, high-gain range) every 12 bunch crossings:
//   * no pile-up: nothing else in the stream but pedestal (50) and +-2 counts of noise;
//   * pile-up: in addition, out-of-time pulses (0..800 counts) start in a random 1 BC
//     out of 6, overlapping the events' windows.
// Every output is checked bit-exactly against the reference models and for its
// arrival time. For the events, the amplitude of the window centred on the pulse peak
// is compared with the true amplitude: without pile-up every OF amplitude must lie
// within 8 counts of it (the filter is linear and noise is small); with pile-up the
// OF spread must grow. The perceptron's spread is printed for both runs: its
// coefficients are placeholders, not trained values, so no accuracy is required of it.
`timescale 1ns / 1ps
module tb_workload_reco;
  import tilecal_pkg::*;
  import tb_ref_pkg::*;

  localparam int N_EVENTS = 500000;   // per run: one million events in all
  localparam int SPACING  = 12;
  localparam int NBC      = N_EVENTS * SPACING;

  logic    clk40 = 0, clk400 = 0, rst_n = 0, in_valid = 0;
  sample_t hg_sample = '0, lg_sample = '0;
  logic    of_valid, of_lg, slp_valid, slp_lg;
  amp_t    of_amp, slp_amp;

  tilecal_reco_top dut (.*);

  always #1.25 clk400 = ~clk400;
  initial begin
    #1.25;
    forever begin clk40 = 1; #12.5; clk40 = 0; #12.5; end
  end

  int checks = 0, failures = 0;
  int bc = 0;
  always @(posedge clk40) bc <= bc + 1;

  initial begin
    #((2 * NBC + 1000) * 25.0);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { int due; longint amp; bit lg; int last; } exp_t;
  exp_t of_q [$], slp_q [$];
  int   hq [$], lq [$];
  real  sig [];
  int   true_amp [];               // true amplitude of an event peaking at a BC, else -1

  // Error statistics per run: [0] OF, [1] SLP.
  real  sum_sq [2];
  real  max_abs [2];
  int   n_ev [2];

  task automatic check_out(input string name, ref exp_t q [$], input logic v,
                           input amp_t a, input logic lg, input int off, input int alg);
    if (v) begin
      checks++;
      if (q.size() == 0 || q[0].due != bc) begin
        failures++; $display("%s: unexpected output at edge %0d", name, bc);
      end else begin
        int p;
        checks++;
        if (longint'(a) != q[0].amp || lg != q[0].lg) begin
          failures++; $display("%s: edge %0d amp %0d expected %0d", name, bc, a, q[0].amp);
        end
        p = q[0].last - off;          // peak index of the window's centre
        if (p >= 0 && true_amp[p] >= 0) begin
          real d;
          d = real'(a) - real'(true_amp[p]);
          sum_sq[alg] += d * d;
          if (d < 0) d = -d;
          if (d > max_abs[alg]) max_abs[alg] = d;
          n_ev[alg]++;
        end
        void'(q.pop_front());
      end
    end else if (q.size() != 0 && q[0].due == bc) begin
      checks++; failures++;
      $display("%s: missing output at edge %0d", name, bc);
      void'(q.pop_front());
    end
  endtask

  task automatic run(input bit pileup, output real rms_of, output real rms_slp, output real max_of);
    sig = new[NBC + 16];
    true_amp = new[NBC + 16];
    foreach (sig[i]) begin sig[i] = 0.0; true_amp[i] = -1; end
    for (int p = 8; p < NBC - 8; p++) begin
      if (p % SPACING == 0) begin
        true_amp[p] = $urandom_range(0, 3900);
        for (int d = -2; d <= 4; d++) sig[p + d] += real'(true_amp[p]) * pulse_shape(d);
      end else if (pileup && $urandom_range(0, 5) == 0) begin
        real a;
        a = real'($urandom_range(0, 800));
        for (int d = -2; d <= 4; d++) sig[p + d] += a * pulse_shape(d);
      end
    end
    sum_sq = '{0.0, 0.0}; max_abs = '{0.0, 0.0}; n_ev = '{0, 0};
    hq.delete(); lq.delete();

    rst_n = 0;
    repeat (3) @(negedge clk40);
    rst_n = 1;
    for (int i = 0; i < NBC + 20; i++) begin
      @(negedge clk40);
      check_out("OF", of_q, of_valid, of_amp, of_lg, 3, 0);
      check_out("SLP", slp_q, slp_valid, slp_amp, slp_lg, 4, 1);
      in_valid = (i < NBC);
      if (in_valid) begin
        int h, l;
        h = 50 + $rtoi(sig[i] + 0.5) + $urandom_range(0, 4) - 2;
        l = 50 + $rtoi(sig[i] / 40.0 + 0.5) + $urandom_range(0, 4) - 2;
        if (h > 4095) h = 4095;
        if (l > 4095) l = 4095;
        hg_sample = ADC_W'(h);
        lg_sample = ADC_W'(l);
        hq.push_back(h); lq.push_back(l);
        if (hq.size() > SLP_N) begin void'(hq.pop_front()); void'(lq.pop_front()); end
        if (hq.size() == SLP_N) begin
          int yo [OF_N], ys [SLP_N];
          bit lg7, lg9;
          exp_t e;
          lg7 = 0; lg9 = 0;
          for (int k = 0; k < SLP_N; k++) if (hq[k] >= 4095) begin lg9 = 1; if (k >= 2) lg7 = 1; end
          for (int k = 0; k < SLP_N; k++) ys[k] = lg9 ? lq[k] : hq[k];
          for (int k = 0; k < OF_N; k++)  yo[k] = lg7 ? lq[k + 2] : hq[k + 2];
          e.last = i;
          e.due = bc + 2; e.amp = of_ref(yo, lg7);  e.lg = lg7; of_q.push_back(e);
          e.due = bc + 5; e.amp = slp_ref(ys, lg9); e.lg = lg9; slp_q.push_back(e);
        end
      end else begin
        hg_sample = '0; lg_sample = '0;
      end
    end
    checks++;
    if (of_q.size() != 0 || slp_q.size() != 0 || n_ev[0] < N_EVENTS - 2 || n_ev[1] < N_EVENTS - 2) begin
      failures++; $display("events lost: OF %0d SLP %0d", n_ev[0], n_ev[1]);
    end
    rms_of  = $sqrt(sum_sq[0] / real'(n_ev[0]));
    rms_slp = $sqrt(sum_sq[1] / real'(n_ev[1]));
    max_of  = max_abs[0];
    $display("%s: %0d events, OF rms error %0.2f (max %0.0f), SLP rms error %0.2f (max %0.0f)",
             pileup ? "pile-up   " : "no pile-up", n_ev[0], rms_of, max_abs[0], rms_slp, max_abs[1]);
  endtask

  initial begin
    real rms_of0, rms_slp0, max_of0, rms_of1, rms_slp1, max_of1;
    run(0, rms_of0, rms_slp0, max_of0);
    run(1, rms_of1, rms_slp1, max_of1);
    checks++;
    if (max_of0 > 8.0) begin failures++; $display("OF not linear without pile-up"); end
    checks++;
    if (!(rms_of1 > 2.0 * rms_of0)) begin failures++; $display("pile-up did not degrade OF"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
