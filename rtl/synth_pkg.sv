// synth_pkg: constants shared by the multi-channel phase-accumulator synthesizer.
//
// The synthesizer time-multiplexes one phase-accumulator adder over several
// channels. The accumulator is 25 bits wide and its adder is split into a
// 13-bit low stage and a 12-bit high stage (these three numbers, and the
// 4-channel / 2-sine-channel configuration, are the reference design's).
// sel_width() gives the width of a channel-select index; it is at least one
// bit so that a single-channel build still has a legal select signal.
package synth_pkg;

  localparam int unsigned ACC_W         = 25;  // phase accumulator length N
  localparam int unsigned LO_W          = 13;  // width of the first adder stage
  localparam int unsigned HI_W          = ACC_W - LO_W;  // second adder stage: 12
  localparam int unsigned SQ_CHANNELS   = 4;   // square-wave channels
  localparam int unsigned SINE_CHANNELS = 2;   // sine channels (two squares each)

  function automatic int unsigned sel_width(input int unsigned n);
    return (n > 1) ? $clog2(n) : 1;
  endfunction

endpackage
