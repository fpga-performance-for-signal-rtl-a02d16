// gain_select - choose the high-gain or the low-gain window for reconstruction.
//
// Each channel is read out in two gains with a ratio of 40. The high-gain (HG) samples
// are used unless one of them is saturated, in which case the low-gain (LG) window is
// used instead and use_lg is raised; the reconstruction downstream multiplies the
// amplitude by the gain ratio so that both paths give HG ADC counts.
// The HG/LG switch with a fixed conversion factor follows the reconstruction scheme;
// the saturation rule (any sample of the window at or above SAT) is this design's
// choice. Purely combinational.
module gain_select #(
  parameter int unsigned N   = 9,
  parameter int unsigned W   = 12,
  parameter int unsigned SAT = 4095    // HG code counted as saturated at or above
) (
  input  logic [N-1:0][W-1:0] hg_win,
  input  logic [N-1:0][W-1:0] lg_win,
  output logic [N-1:0][W-1:0] sel_win,
  output logic                use_lg
);

  always_comb begin
    use_lg = 1'b0;
    for (int i = 0; i < int'(N); i++)
      if (32'(hg_win[i]) >= SAT) use_lg = 1'b1;
    sel_win = use_lg ? lg_win : hg_win;
  end

endmodule
