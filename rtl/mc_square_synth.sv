// mc_square_synth: multi-channel square-wave synthesizer built on one shared
// phase accumulator.
//
// A single adder serves CHANNELS channels in turn. A counter selects one
// channel per clock; a multiplexer puts that channel's control word on the
// adder, a second multiplexer feeds back the phase the channel's latch holds,
// and the sum is written back into the same latch. Each channel therefore
// performs s(n) = s(n-1) + w once every CHANNELS clocks, and the most
// significant bit of its phase is a square wave of average frequency
//     F = w * Fclk / (CHANNELS * 2^ACC_W).
// With the defaults (4 channels, 25-bit accumulator, 40 MHz clock) every
// channel runs at an effective 10 MHz with 10 MHz / 2^25 = 0.3 Hz resolution.
// CHANNELS = 1 gives the plain single-channel phase accumulator.
//
// The adder is the two-stage pipelined adder (13-bit low, 12-bit high). The
// low half of channel c is updated in the cycle the counter selects c and the
// high half one cycle later, so the high-half multiplexer and the latch
// demultiplexer's high side use the select delayed by one cycle. Any number
// of channels, including one, works with this schedule.
//
// Interface. ctrl_word[c] is channel c's frequency word, read in the cycle
// the counter selects c; changing it changes the frequency with continuous
// phase, because the latch is never cleared. sq_out[c] is channel c's square
// wave and phase[c] its full phase (the low half may be one update ahead of
// the high half). frame is high in cycles in which all channels' high halves
// have had the same number of updates: a consumer that combines several
// channels should sample sq_out only then. frame_slot is the counter value,
// exposed for observation. Reset (asynchronous, active low) zeroes all phases.
//
// The structure follows the reference design; the update schedule of the two
// adder halves, the frame signal and the reset are this design's choices.
module mc_square_synth #(
  parameter int unsigned CHANNELS = synth_pkg::SQ_CHANNELS,
  parameter int unsigned ACC_W    = synth_pkg::ACC_W,
  parameter int unsigned LO_W     = synth_pkg::LO_W,
  localparam int unsigned HI_W    = ACC_W - LO_W,
  localparam int unsigned SEL_W   = synth_pkg::sel_width(CHANNELS)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [ACC_W-1:0]    ctrl_word [CHANNELS],
  output logic [CHANNELS-1:0] sq_out,
  output logic [ACC_W-1:0]    phase [CHANNELS],
  output logic                frame,
  output logic [SEL_W-1:0]    frame_slot
);

  logic [SEL_W-1:0] sel, sel_d;
  logic             wrap;
  logic [ACC_W-1:0] word;
  logic [LO_W-1:0]  q_lo [CHANNELS];
  logic [HI_W-1:0]  q_hi [CHANNELS];
  logic [LO_W-1:0]  acc_lo, sum_lo;
  logic [HI_W-1:0]  acc_hi, sum_hi;

  chan_counter #(.CHANNELS(CHANNELS)) u_counter (
    .clk, .rst_n, .sel, .wrap
  );

  // Channel whose high half is updated this cycle: the one selected last cycle.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sel_d <= SEL_W'(CHANNELS - 1);
    else        sel_d <= sel;
  end

  chan_mux #(.N(CHANNELS), .W(ACC_W)) u_word_mux (
    .din(ctrl_word), .sel(sel), .dout(word)
  );

  chan_mux #(.N(CHANNELS), .W(LO_W)) u_fb_mux_lo (
    .din(q_lo), .sel(sel), .dout(acc_lo)
  );

  chan_mux #(.N(CHANNELS), .W(HI_W)) u_fb_mux_hi (
    .din(q_hi), .sel(sel_d), .dout(acc_hi)
  );

  pipelined_adder #(.LO_W(LO_W), .HI_W(HI_W)) u_adder (
    .clk, .rst_n,
    .a(word), .b_lo(acc_lo), .b_hi(acc_hi),
    .sum_lo, .sum_hi
  );

  channel_latches #(.N(CHANNELS), .LO_W(LO_W), .HI_W(HI_W)) u_latches (
    .clk, .rst_n,
    .lo_sel(sel),   .lo_data(sum_lo),
    .hi_sel(sel_d), .hi_data(sum_hi),
    .q_lo, .q_hi, .msb(sq_out)
  );

  always_comb
    for (int unsigned c = 0; c < CHANNELS; c++) phase[c] = {q_hi[c], q_lo[c]};

  // The high half of the last channel was written at the end of the cycle in
  // which sel_d was CHANNELS-1, i.e. the cycle that now shows sel_d == 0.
  assign frame      = (sel_d == '0);
  assign frame_slot = sel;

  // The counter and the delayed select must stay one slot apart.
  a_sel_follow : assert property (@(posedge clk) disable iff (!rst_n)
    1'b1 |=> (sel_d == $past(sel)));

  // The delayed select never wraps out of range.
  a_sel_range : assert property (@(posedge clk) disable iff (!rst_n)
    (int'(sel) < int'(CHANNELS)) && (int'(sel_d) < int'(CHANNELS)));

  logic unused_wrap;
  assign unused_wrap = wrap;

endmodule
