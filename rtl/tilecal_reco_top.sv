// tilecal_reco_top - amplitude reconstruction of one TileCal PMT channel in the
// off-detector PreProcessor.
//
// Every bunch crossing (BC, 40 MHz) brings one high-gain and one low-gain 12-bit sample.
// A 9-sample sliding window (sample_window) feeds two reconstructions side by side:
//  * Optimal Filtering (of_core): weighted sum of the 7 newest samples;
//  * Single Layer Perceptron (slp_core): normalise 9 samples, one weight layer,
//    piecewise-linear tanh, de-normalise.
// Each has its own gain_select, which switches to the low-gain samples (amplitude times
// 40) when a high-gain sample of its window saturates. Both compute in the 400 MHz
// processing domain: the window toggles a bit that bc_strobe_sync turns into a start
// strobe three fast cycles after the BC edge, the window registers being stable for the
// whole BC. latency_align brings each result back to the 40 MHz domain at a fixed BC and
// pads it to a fixed latency.
//
// Latency, counted in clk40 edges from the edge that captures the first sample of a
// window to the edge at which the amplitude appears with its valid pulse:
//   OF  : (OF_N  - 1) + OF_CAP_BC  + OF_DELAY  = OF_LATENCY_BC  (default 7)
//   SLP : (SLP_N - 1) + SLP_CAP_BC + SLP_DELAY = SLP_LATENCY_BC (default 12)
// OF_CAP_BC / SLP_CAP_BC follow from the fast-cycle count of each core (localparams
// below); an elaboration check rejects latencies shorter than the pipeline allows.
// A new window is accepted every BC; outputs follow one per BC once the window is full.
//
// Clocks: clk400 must be phase aligned to clk40 with ten clk400 cycles per clk40 cycle
// (both derived from the bunch-crossing clock). rst_n is synchronous to both and must be
// held low for at least two clk40 cycles.
// The two algorithms, the window lengths, the two clock domains, the gain ratio and the
// 7 / 12 BC latencies follow the reconstruction scheme; the clock crossing, the
// latency padding and all fixed-point constants are this design's choices.
module tilecal_reco_top
  import tilecal_pkg::*;
#(
  parameter int unsigned OF_LATENCY_BC  = 7,
  parameter int unsigned SLP_LATENCY_BC = 12,
  parameter int unsigned SLP_LANES      = 1
) (
  input  logic    clk40,
  input  logic    clk400,
  input  logic    rst_n,
  input  logic    in_valid,
  input  sample_t hg_sample,
  input  sample_t lg_sample,
  output logic    of_valid,
  output amp_t    of_amp,
  output logic    of_lg,
  output logic    slp_valid,
  output amp_t    slp_amp,
  output logic    slp_lg
);

  // Fast cycles from the BC edge to the write of each core's result register:
  // 3 (strobe) + core pipeline.
  localparam int unsigned OF_FAST   = 3 + 2;
  localparam int unsigned SLP_STEPS = (SLP_N + SLP_LANES - 1) / SLP_LANES;
  localparam int unsigned SLP_FAST  = 3 + SLP_STEPS + 4;
  localparam int unsigned OF_CAP_BC  = OF_FAST / 10 + 1;
  localparam int unsigned SLP_CAP_BC = SLP_FAST / 10 + 1;
  localparam int          OF_DELAY   = int'(OF_LATENCY_BC)  - int'(OF_N - 1)  - int'(OF_CAP_BC);
  localparam int          SLP_DELAY  = int'(SLP_LATENCY_BC) - int'(SLP_N - 1) - int'(SLP_CAP_BC);

  // 40 MHz side ------------------------------------------------------------------
  logic [SLP_N-1:0][ADC_W-1:0] hg_win, lg_win, slp_win;
  logic                        win_valid, win_toggle;
  logic [OF_N-1:0][ADC_W-1:0]  of_win;
  logic                        of_use_lg, slp_use_lg;

  sample_window #(.N(SLP_N), .W(ADC_W)) u_window (
    .clk(clk40), .rst_n, .in_valid, .hg_in(hg_sample), .lg_in(lg_sample),
    .hg_win, .lg_win, .win_valid, .win_toggle
  );

  gain_select #(.N(OF_N), .W(ADC_W), .SAT(HG_SAT)) u_of_gain (
    .hg_win(hg_win[SLP_N-1 -: OF_N]), .lg_win(lg_win[SLP_N-1 -: OF_N]),
    .sel_win(of_win), .use_lg(of_use_lg)
  );

  gain_select #(.N(SLP_N), .W(ADC_W), .SAT(HG_SAT)) u_slp_gain (
    .hg_win, .lg_win, .sel_win(slp_win), .use_lg(slp_use_lg)
  );

  // 400 MHz side -----------------------------------------------------------------
  logic    start;
  result_t of_res, slp_res;

  bc_strobe_sync u_sync (.clk(clk400), .rst_n, .toggle_in(win_toggle), .strobe(start));

  of_core #(.N(OF_N), .LANES(OF_N)) u_of (
    .clk(clk400), .rst_n, .start, .win(of_win), .use_lg(of_use_lg),
    .amp(of_res.amp), .amp_lg(of_res.lg), .done()
  );

  slp_core #(.N(SLP_N), .LANES(SLP_LANES)) u_slp (
    .clk(clk400), .rst_n, .start, .win(slp_win), .use_lg(slp_use_lg),
    .amp(slp_res.amp), .amp_lg(slp_res.lg), .done()
  );

  // Back to 40 MHz at a fixed latency ----------------------------------------------
  result_t of_out, slp_out;

  latency_align #(.CAP_BC(OF_CAP_BC), .DELAY_BC(OF_DELAY), .W($bits(result_t))) u_of_align (
    .clk(clk40), .rst_n, .tag_in(win_valid), .data_in(of_res),
    .out_valid(of_valid), .out_data(of_out)
  );

  latency_align #(.CAP_BC(SLP_CAP_BC), .DELAY_BC(SLP_DELAY), .W($bits(result_t))) u_slp_align (
    .clk(clk40), .rst_n, .tag_in(win_valid), .data_in(slp_res),
    .out_valid(slp_valid), .out_data(slp_out)
  );

  assign of_amp  = of_out.amp;
  assign of_lg   = of_out.lg;
  assign slp_amp = slp_out.amp;
  assign slp_lg  = slp_out.lg;

  initial begin
    if (OF_DELAY < 0)  $error("OF_LATENCY_BC is below the minimum of %0d", OF_N - 1 + OF_CAP_BC);
    if (SLP_DELAY < 0) $error("SLP_LATENCY_BC is below the minimum of %0d", SLP_N - 1 + SLP_CAP_BC);
    if (SLP_STEPS > 9) $error("SLP_LANES too small: one window per BC needs at most 9 MAC steps");
    if (SLP_FAST % 10 < 2 || SLP_FAST % 10 > 8)
      $error("SLP result written too close to a clk40 edge for a safe capture");
  end

endmodule
