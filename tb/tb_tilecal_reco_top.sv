// tb_tilecal_reco_top - end-to-end test of the channel reconstruction at its default
// parameters (7 / 12 BC latency, one multiplier for the perceptron).
//
// Clocks: 40 MHz and 400 MHz, phase aligned. The stimulus is a detector-like stream of
// 4000 bunch crossings: pedestal 50 with +-2 counts of noise, pulses of the reference
// shape starting in about 1 BC out of 12 (so pulses overlap: pile-up), with amplitudes
// mostly below 1500 counts, some up to 3900 and some large enough (4000..12000) to
// saturate the high-gain samples, the low-gain samples being 1/40 of the signal.
// During one stretch the input pauses at random (in_valid low).
//
// Every window gives one OF and one perceptron result; each is checked bit-exactly
// against the reference models (including the gain choice) and must arrive exactly
// 1 (OF) or 4 (SLP) edges after the edge that captured the window's last sample, which
// makes 7 and 12 edges from its first sample when the input does not pause. Counted
// mechanisms, each of which must occur: low-gain switch in OF and in the perceptron,
// a window where only the perceptron switches (saturated sample outside the OF
// window), negative OF amplitudes under pile-up, input pauses, and the 7 / 12 BC
// latency from the first sample.
`timescale 1ns / 1ps
module tb_tilecal_reco_top;
  import tilecal_pkg::*;
  import tb_ref_pkg::*;

  localparam int NBC = 4000;

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

  int  checks = 0, failures = 0;
  int  bc = 0;                       // clk40 edges so far
  always @(posedge clk40) bc <= bc + 1;

  initial begin
    #((NBC + 200) * 25.0);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Stimulus, generated before the run.
  real sig [NBC + 16];
  int  hg_s [NBC], lg_s [NBC];
  bit  vld  [NBC];

  // Accepted samples and expected outputs.
  int hq [$], lq [$], eq [$];         // samples and capture edge of each accepted sample
  typedef struct { int due; longint amp; bit lg; } exp_t;
  exp_t of_q [$], slp_q [$];

  int n_of_lg = 0, n_slp_lg = 0, n_slp_only_lg = 0, n_neg = 0, n_pause = 0;
  int n_lat7 = 0, n_lat12 = 0, n_of = 0, n_slp = 0;

  function automatic void gain_ref(input int h [], input int l [], output int y [], output bit lg);
    lg = 0;
    foreach (h[i]) if (h[i] >= 4095) lg = 1;
    y = new[h.size()];
    foreach (h[i]) y[i] = lg ? l[i] : h[i];
  endfunction

  task automatic check_out(input string name, ref exp_t q [$], input logic v,
                           input amp_t a, input logic lg);
    if (v) begin
      checks++;
      if (q.size() == 0 || q[0].due != bc) begin
        failures++; $display("%s: unexpected output at edge %0d", name, bc);
      end else begin
        checks++;
        if (longint'(a) != q[0].amp || lg != q[0].lg) begin
          failures++;
          $display("%s: edge %0d amp %0d lg %0d, expected %0d lg %0d", name, bc, a, lg, q[0].amp, q[0].lg);
        end
        void'(q.pop_front());
      end
    end else if (q.size() != 0 && q[0].due == bc) begin
      checks++; failures++;
      $display("%s: missing output at edge %0d", name, bc);
      void'(q.pop_front());
    end
  endtask

  initial begin
    for (int i = 0; i < NBC + 16; i++) sig[i] = 0.0;
    for (int p = 4; p < NBC; p++) begin
      if ($urandom_range(0, 11) == 0) begin
        int r;
        real a;
        r = $urandom_range(0, 99);
        if (r < 80)      a = real'($urandom_range(0, 1500));
        else if (r < 92) a = real'($urandom_range(1500, 3900));
        else             a = real'($urandom_range(4000, 12000));
        for (int d = -2; d <= 4; d++) sig[p + d] += a * pulse_shape(d);
      end
    end
    for (int i = 0; i < NBC; i++) begin
      int h, l;
      h = 50 + $rtoi(sig[i] + 0.5) + $urandom_range(0, 4) - 2;
      l = 50 + $rtoi(sig[i] / 40.0 + 0.5) + $urandom_range(0, 4) - 2;
      hg_s[i] = (h > 4095) ? 4095 : h;
      lg_s[i] = (l > 4095) ? 4095 : l;
      vld[i]  = (i >= 2000 && i < 2400) ? ($urandom_range(0, 4) != 0) : 1'b1;
    end

    repeat (3) @(negedge clk40);
    rst_n = 1;
    for (int i = 0; i < NBC + 20; i++) begin
      @(negedge clk40);               // outputs of edge bc are visible now
      check_out("OF", of_q, of_valid, of_amp, of_lg);
      check_out("SLP", slp_q, slp_valid, slp_amp, slp_lg);
      if (of_valid) begin n_of++; if (of_amp < 0) n_neg++; if (of_lg) n_of_lg++; end
      if (slp_valid) begin n_slp++; if (slp_lg) n_slp_lg++; end
      // Drive the sample that the next edge, number bc + 1, captures.
      in_valid = (i < NBC) ? vld[i] : 1'b0;
      hg_sample = (i < NBC) ? ADC_W'(hg_s[i]) : '0;
      lg_sample = (i < NBC) ? ADC_W'(lg_s[i]) : '0;
      if (i < NBC && !vld[i]) n_pause++;
      if (in_valid) begin
        hq.push_back(hg_s[i]); lq.push_back(lg_s[i]); eq.push_back(bc + 1);
        if (hq.size() > SLP_N) begin void'(hq.pop_front()); void'(lq.pop_front()); void'(eq.pop_front()); end
        if (hq.size() == SLP_N) begin
          int h7 [], l7 [], h9 [], l9 [], y [];
          int yo [OF_N], ys [SLP_N];
          bit lg7, lg9;
          exp_t e;
          h9 = new[SLP_N]; l9 = new[SLP_N]; h7 = new[OF_N]; l7 = new[OF_N];
          foreach (h9[k]) begin h9[k] = hq[k]; l9[k] = lq[k]; end
          foreach (h7[k]) begin h7[k] = hq[k + 2]; l7[k] = lq[k + 2]; end
          gain_ref(h7, l7, y, lg7);
          foreach (yo[k]) yo[k] = y[k];
          gain_ref(h9, l9, y, lg9);
          foreach (ys[k]) ys[k] = y[k];
          if (lg9 && !lg7) n_slp_only_lg++;
          e.due = bc + 1 + 1; e.amp = of_ref(yo, lg7);  e.lg = lg7; of_q.push_back(e);
          e.due = bc + 1 + 4; e.amp = slp_ref(ys, lg9); e.lg = lg9; slp_q.push_back(e);
          if (eq[SLP_N-1] - eq[0] == SLP_N - 1) begin
            checks += 2;
            if (bc + 2 - eq[2] == 7) n_lat7++;  else begin failures++; $display("OF latency"); end
            if (bc + 5 - eq[0] == 12) n_lat12++; else begin failures++; $display("SLP latency"); end
          end
        end
      end
    end

    checks++;
    if (of_q.size() != 0 || slp_q.size() != 0) begin failures++; $display("outputs missing at the end"); end
    $display("OF outputs %0d (LG %0d, negative %0d), SLP outputs %0d (LG %0d, SLP-only LG %0d)",
             n_of, n_of_lg, n_neg, n_slp, n_slp_lg, n_slp_only_lg);
    $display("input pauses %0d, 7 BC latencies %0d, 12 BC latencies %0d", n_pause, n_lat7, n_lat12);
    checks += 7;
    if (n_of_lg == 0)       begin failures++; $display("OF gain switch never happened"); end
    if (n_slp_lg == 0)      begin failures++; $display("SLP gain switch never happened"); end
    if (n_slp_only_lg == 0) begin failures++; $display("SLP-only gain switch never happened"); end
    if (n_neg == 0)         begin failures++; $display("no negative OF amplitude"); end
    if (n_pause == 0)       begin failures++; $display("no input pause"); end
    if (n_lat7 == 0)        begin failures++; $display("no 7 BC latency check"); end
    if (n_lat12 == 0)       begin failures++; $display("no 12 BC latency check"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
