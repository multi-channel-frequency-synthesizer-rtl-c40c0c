// sine_synth_2ch: digital part of the two-channel sine-wave synthesizer.
//
// A four-channel time-multiplexed square-wave synthesizer (one shared 25-bit
// phase accumulator, 40 MHz clock, 10 MHz per channel) produces two pairs of
// square waves. Sine channel k uses square channel 2k, set to twice the wanted
// frequency, and square channel 2k+1, set to four times it; for a wanted
// frequency f the words are w(2k) = 2f * 2^25 / 10 MHz and w(2k+1) = 2 w(2k)
// (rounding w(2k+1) up rather than down keeps the 4f wave's wrap no later
// than the 2f wave's rising edge). A square-wave phase shifter per sine
// channel turns each pair into three squares at f, 45 degrees apart. Off
// chip, an analog adder weights them 1 : sqrt(2) : 1, which cancels the 3rd
// and 5th harmonics, and a tunable low-pass filter removes the rest; both are
// analog and not part of this RTL, so the three squares are outputs.
//
// Ports: ctrl_word[0..3] are the four channel words, sq_out the four square
// channels, and shift_lead/shift_mid/shift_lag[k] the +45/0/-45 degree squares
// of sine channel k. frame_slot is the channel counter: to retune a sine
// channel, change both of its words while frame_slot is 3, so that both
// square channels take them in the same frame. Changing the words changes
// frequency with continuous phase. Reset is asynchronous, active low.
module sine_synth_2ch #(
  parameter int unsigned ACC_W = synth_pkg::ACC_W,
  parameter int unsigned LO_W  = synth_pkg::LO_W,
  localparam int unsigned SINE_CH  = synth_pkg::SINE_CHANNELS,
  localparam int unsigned CHANNELS = 2 * SINE_CH
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [ACC_W-1:0]    ctrl_word [CHANNELS],
  output logic [CHANNELS-1:0] sq_out,
  output logic [SINE_CH-1:0]  shift_lead,
  output logic [SINE_CH-1:0]  shift_mid,
  output logic [SINE_CH-1:0]  shift_lag,
  output logic [synth_pkg::sel_width(CHANNELS)-1:0] frame_slot
);

  logic [ACC_W-1:0] phase [CHANNELS];
  logic             frame;

  mc_square_synth #(.CHANNELS(CHANNELS), .ACC_W(ACC_W), .LO_W(LO_W)) u_squares (
    .clk, .rst_n, .ctrl_word, .sq_out, .phase, .frame, .frame_slot
  );

  for (genvar k = 0; k < SINE_CH; k++) begin : g_sine
    square_phase_shifter u_shift (
      .clk, .rst_n,
      .sample  (frame),
      .sq_2x   (sq_out[2*k]),
      .sq_4x   (sq_out[2*k+1]),
      .out_lead(shift_lead[k]),
      .out_mid (shift_mid[k]),
      .out_lag (shift_lag[k])
    );
  end

  logic unused;
  assign unused = ^{phase[0], phase[1], phase[2], phase[3]};

endmodule
