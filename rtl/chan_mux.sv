// chan_mux: an N-to-1 channel multiplexer.
//
// The synthesizer uses two of them: one puts the current channel's control
// word on the adder's first input, the other feeds the current channel's
// latched phase back to the adder's second input. dout = din[sel]; it is
// purely combinational. A select value at or above N (possible only when N is
// not a power of two) gives zero. The two multiplexers and their shared
// counter select come from the reference design; the binary select encoding
// and the zero for unused selects are this design's choice.
module chan_mux #(
  parameter int unsigned N     = synth_pkg::SQ_CHANNELS,
  parameter int unsigned W     = synth_pkg::ACC_W,
  localparam int unsigned SEL_W = synth_pkg::sel_width(N)
) (
  input  logic [W-1:0]     din [N],
  input  logic [SEL_W-1:0] sel,
  output logic [W-1:0]     dout
);

  always_comb begin
    dout = '0;
    for (int unsigned i = 0; i < N; i++)
      if (sel == SEL_W'(i)) dout = din[i];
  end

endmodule
