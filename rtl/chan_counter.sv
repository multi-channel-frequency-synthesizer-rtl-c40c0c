// chan_counter: the channel-select counter of the time-multiplexed synthesizer.
//
// It counts 0, 1, ..., CHANNELS-1 and wraps, advancing once per clock. Its
// value drives the word multiplexer, the feedback multiplexer and the latch
// demultiplexer so that all three address the same channel in the same cycle.
// wrap is high in the cycle in which the count holds CHANNELS-1, i.e. the last
// slot of a frame. Reset (asynchronous, active low) starts the count at 0.
// The document only names this counter; the modulo-CHANNELS count and the
// reset value are this design's choice.
module chan_counter #(
  parameter int unsigned CHANNELS = synth_pkg::SQ_CHANNELS,
  localparam int unsigned SEL_W   = synth_pkg::sel_width(CHANNELS)
) (
  input  logic             clk,
  input  logic             rst_n,
  output logic [SEL_W-1:0] sel,
  output logic             wrap
);

  localparam logic [SEL_W-1:0] LAST = SEL_W'(CHANNELS - 1);

  assign wrap = (sel == LAST);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    sel <= '0;
    else if (wrap) sel <= '0;
    else           sel <= sel + 1'b1;
  end

endmodule
