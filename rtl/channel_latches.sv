// channel_latches: the output demultiplexer and the per-channel phase latches.
//
// Every clock the low half of the adder result is written into the latch of
// channel lo_sel and the high half into the latch of channel hi_sel; all
// other latches hold. (In the synthesizer hi_sel is lo_sel delayed by one
// cycle, matching the two-stage adder.) Writing through a per-channel enable
// is the demultiplexer of the reference design; the latches are edge-triggered
// registers here. q_lo and q_hi are the held halves, and msb is the top bit of
// each channel's phase, which is that channel's square-wave output. Reset
// (asynchronous, active low) clears every latch, so all channels start at
// phase zero.
module channel_latches #(
  parameter int unsigned N     = synth_pkg::SQ_CHANNELS,
  parameter int unsigned LO_W  = synth_pkg::LO_W,
  parameter int unsigned HI_W  = synth_pkg::HI_W,
  localparam int unsigned SEL_W = synth_pkg::sel_width(N)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [SEL_W-1:0] lo_sel,
  input  logic [LO_W-1:0]  lo_data,
  input  logic [SEL_W-1:0] hi_sel,
  input  logic [HI_W-1:0]  hi_data,
  output logic [LO_W-1:0]  q_lo [N],
  output logic [HI_W-1:0]  q_hi [N],
  output logic [N-1:0]     msb
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned i = 0; i < N; i++) begin
        q_lo[i] <= '0;
        q_hi[i] <= '0;
      end
    end else begin
      for (int unsigned i = 0; i < N; i++) begin
        if (lo_sel == SEL_W'(i)) q_lo[i] <= lo_data;
        if (hi_sel == SEL_W'(i)) q_hi[i] <= hi_data;
      end
    end
  end

  always_comb
    for (int unsigned i = 0; i < N; i++) msb[i] = q_hi[i][HI_W-1];

endmodule
