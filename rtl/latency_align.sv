// latency_align - hand a result from the 400 MHz domain to the 40 MHz domain at a fixed
// bunch crossing, then delay it to a fixed total latency.
//
// tag_in is the 40 MHz "window valid" pulse of the window the result belongs to. The
// fast domain writes its result register a fixed number of fast cycles after that
// window appeared and holds it for ten fast cycles. CAP_BC bunch crossings after the
// tag this module samples data_in (the two clocks are phase aligned, so this is a
// multicycle path, not an asynchronous crossing; CAP_BC must be chosen so that the
// result was written after the previous and before this sampling edge). A delay line
// of DELAY_BC registers then pads the latency so that it is the same for every window.
//
// Timing: out_valid/out_data change CAP_BC + DELAY_BC clock edges after the edge that
// raised tag_in; out_valid is then high for one cycle. Fixed, deterministic latency follows the reconstruction
// scheme; the capture-and-delay structure is this design's choice.
module latency_align #(
  parameter int unsigned CAP_BC   = 1,   // >= 1
  parameter int unsigned DELAY_BC = 0,
  parameter int unsigned W        = 25
) (
  input  logic         clk,          // 40 MHz
  input  logic         rst_n,
  input  logic         tag_in,
  input  logic [W-1:0] data_in,
  output logic         out_valid,
  output logic [W-1:0] out_data
);

  logic [CAP_BC-1:0]   tags;          // tags[j]: tag_in delayed by j+1 edges
  logic                cap_en;
  logic [DELAY_BC:0]   vld_pipe;
  logic [W-1:0]        dat_pipe [DELAY_BC+1];

  always_ff @(posedge clk) begin
    if (!rst_n) tags <= '0;
    else        tags <= CAP_BC'({tags, tag_in});
  end

  assign cap_en = (CAP_BC == 1) ? tag_in : tags[(CAP_BC > 1) ? CAP_BC - 2 : 0];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      vld_pipe <= '0;
      for (int j = 0; j <= int'(DELAY_BC); j++) dat_pipe[j] <= '0;
    end else begin
      vld_pipe[0] <= cap_en;
      if (cap_en) dat_pipe[0] <= data_in;
      for (int j = 1; j <= int'(DELAY_BC); j++) begin
        vld_pipe[j] <= vld_pipe[j-1];
        dat_pipe[j] <= dat_pipe[j-1];
      end
    end
  end

  assign out_valid = vld_pipe[DELAY_BC];
  assign out_data  = dat_pipe[DELAY_BC];

  initial begin
    if (CAP_BC < 1) $error("latency_align: CAP_BC must be at least 1");
  end

endmodule
