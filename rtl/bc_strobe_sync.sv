// bc_strobe_sync - bring the "new window" event from the 40 MHz domain into the
// 400 MHz processing domain.
//
// The 40 MHz side toggles toggle_in once per new window. Here it passes two flip-flops
// (a synchroniser, safe even if the clocks were unrelated) and a third flop for edge
// detection; every change of state gives a one-cycle strobe. The window data itself
// does not pass through flops: it is held for a whole bunch crossing (ten fast cycles),
// and the consumer captures it on the strobe, three fast cycles after the 40 MHz edge.
// The two clock domains follow the reconstruction scheme; the toggle synchroniser is
// this design's choice.
module bc_strobe_sync (
  input  logic clk,        // 400 MHz
  input  logic rst_n,
  input  logic toggle_in,  // from the 40 MHz domain
  output logic strobe
);

  logic [2:0] sync;

  always_ff @(posedge clk) begin
    if (!rst_n) sync <= '0;
    else        sync <= {sync[1:0], toggle_in};
  end

  assign strobe = sync[2] ^ sync[1];

endmodule
