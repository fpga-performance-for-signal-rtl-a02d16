// sample_window - sliding window of the last N high-gain / low-gain sample pairs.
//
// A shift-register FIFO in the 40 MHz bunch-crossing domain. Every cycle with
// in_valid high the pair (hg_in, lg_in) enters at the newest end, index N-1, and the
// oldest pair, index 0, drops out. Once N pairs have entered since reset, every new
// pair produces a full window: win_valid pulses for one cycle together with the
// updated window, and win_toggle changes state. win_toggle is the only signal that
// crosses to the 400 MHz domain; the window contents stay stable for a whole BC after
// it changes, so the fast side may sample them once it has seen the toggle.
//
// The FIFO holding the sliding window follows the reconstruction scheme; the index
// order, the fill counter and the toggle are this design's choices.
// Timing: window and win_valid are registered; they change one cycle after the input.
module sample_window #(
  parameter int unsigned N = 9,    // window length in samples
  parameter int unsigned W = 12    // sample width
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic [W-1:0]        hg_in,
  input  logic [W-1:0]        lg_in,
  output logic [N-1:0][W-1:0] hg_win,     // [0] oldest, [N-1] newest
  output logic [N-1:0][W-1:0] lg_win,
  output logic                win_valid,
  output logic                win_toggle
);

  localparam int unsigned CNT_W = $clog2(N + 1);
  logic [CNT_W-1:0] fill;          // samples held, saturates at N
  logic             full_next;

  assign full_next = (fill >= CNT_W'(N - 1));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      hg_win     <= '0;
      lg_win     <= '0;
      fill       <= '0;
      win_valid  <= 1'b0;
      win_toggle <= 1'b0;
    end else begin
      win_valid <= 1'b0;
      if (in_valid) begin
        hg_win <= {hg_in, hg_win[N-1:1]};
        lg_win <= {lg_in, lg_win[N-1:1]};
        if (fill != CNT_W'(N)) fill <= fill + 1'b1;
        if (full_next) begin
          win_valid  <= 1'b1;
          win_toggle <= ~win_toggle;
        end
      end
    end
  end

endmodule
