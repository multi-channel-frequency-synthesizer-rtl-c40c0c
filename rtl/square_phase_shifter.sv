// square_phase_shifter: turns square waves at 2f and 4f into three square
// waves at f, phase shifted by +45, 0 and -45 degrees.
//
// Three toggle flip-flops with T tied high divide by two, and one NAND gate
// combines the two inputs, as in the reference design:
//   * out_lead toggles on each rising edge of the 2f wave;
//   * out_mid  toggles on each falling edge of NAND(2f, 4f), that is when the
//     4f wave rises while the 2f wave is high, an eighth of a period of f
//     after the 2f rising edge;
//   * out_lag  toggles on each falling edge of the 2f wave, a quarter period
//     of f after its rising edge.
// So out_lead leads out_mid by 45 degrees and out_lag trails it by 45
// degrees. Summed with weights 1 : sqrt(2) : 1 (an analog adder outside this
// block) the 3rd and 5th harmonics of the squares cancel.
//
// This design keeps one clock: instead of clocking the flip-flops with the
// waves, it samples both inputs when sample is high and toggles on the edges
// it sees between samples. The inputs come from a time-multiplexed
// synthesizer whose channels are written in different cycles, so sample
// should be its frame signal; sampling only then removes a one-clock overlap
// of the two waves that would otherwise pulse the NAND output. Outputs change
// one clock after the sample that shows the edge, equally for all three.
// Reset (asynchronous, active low) clears all flip-flops, which fixes the
// three outputs' relative polarity: they start low and rise in the order
// lead, mid, lag. The edge polarities and the sampling are this design's
// reading of the circuit; the document gives the gates and their roles.
module square_phase_shifter (
  input  logic clk,
  input  logic rst_n,
  input  logic sample,   // take a new sample of the two waves
  input  logic sq_2x,    // square wave at twice the wanted frequency
  input  logic sq_4x,    // square wave at four times the wanted frequency
  output logic out_lead, // +45 degrees
  output logic out_mid,  //   0 degrees
  output logic out_lag   // -45 degrees
);

  logic s2_q, nand_q;
  logic nand_now;

  assign nand_now = ~(sq_2x & sq_4x);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s2_q     <= 1'b0;
      nand_q   <= 1'b1;
      out_lead <= 1'b0;
      out_mid  <= 1'b0;
      out_lag  <= 1'b0;
    end else if (sample) begin
      s2_q   <= sq_2x;
      nand_q <= nand_now;
      if (!s2_q && sq_2x)     out_lead <= ~out_lead;  // 2f rising edge
      if (nand_q && !nand_now) out_mid <= ~out_mid;    // NAND falling edge
      if (s2_q && !sq_2x)     out_lag  <= ~out_lag;   // 2f falling edge
    end
  end

endmodule
