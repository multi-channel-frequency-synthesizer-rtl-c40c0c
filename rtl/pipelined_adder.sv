// pipelined_adder: the phase-accumulator adder, split into two pipeline stages.
//
// The 25-bit addition a + b is done as a 13-bit low addition followed, one
// clock later, by a 12-bit high addition that takes the low stage's carry
// from a register (the reference design uses exactly this 13 + 12 split).
//
// Timing. In cycle t the caller presents the word a and the low half of the
// other operand, b_lo; sum_lo = a[LO] + b_lo appears combinationally in the
// same cycle. The carry and the high half of a are registered. In cycle t+1
// the caller presents the high half of the other operand, b_hi, and
// sum_hi = b_hi + a_hi(t) + carry(t) appears combinationally. Taking b_hi one
// cycle late, rather than registering it with a, is what lets an accumulator
// built on this adder read the high half of its own latch after that latch
// was written, so the adder works inside a single-cycle feedback loop.
// Reset clears the registered carry and word half.
module pipelined_adder #(
  parameter int unsigned LO_W = synth_pkg::LO_W,
  parameter int unsigned HI_W = synth_pkg::HI_W
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [LO_W+HI_W-1:0] a,       // stage 1: full word
  input  logic [LO_W-1:0]      b_lo,    // stage 1: low half of the other operand
  input  logic [HI_W-1:0]      b_hi,    // stage 2: high half of the other operand
  output logic [LO_W-1:0]      sum_lo,  // stage 1 result
  output logic [HI_W-1:0]      sum_hi   // stage 2 result
);

  logic            carry_d, carry_q;
  logic [HI_W-1:0] a_hi_q;

  assign {carry_d, sum_lo} = {1'b0, a[LO_W-1:0]} + {1'b0, b_lo};
  assign sum_hi            = b_hi + a_hi_q + HI_W'(carry_q);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      carry_q <= 1'b0;
      a_hi_q  <= '0;
    end else begin
      carry_q <= carry_d;
      a_hi_q  <= a[LO_W+HI_W-1:LO_W];
    end
  end

endmodule
