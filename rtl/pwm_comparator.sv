// Digital PWM comparator.
//
// Compares the DUTY_W most significant bits of a carrier with the duty value
// and drives the PWM output high while duty > carrier_msb. The caller feeds
// only the top DUTY_W bits of the accumulator (or of a phase-shifted copy).
// That is enough because the accumulator always sweeps its whole range, so
// its MSBs form a full-scale DUTY_W-bit sawtooth whatever the accumulator
// width. The test is greater-than, not equality, because the carrier
// advances in steps that can be much larger than one count and would skip
// over an equal value.
//
// A duty of 0 gives a constant low output. A duty of D gives an average high
// fraction of D / 2^DUTY_W. Purely combinational, with no output register.
// The '>' test on the MSBs follows the reference design. Which operand sits
// on which side of it is this design's choice.
module pwm_comparator #(
  parameter int unsigned DUTY_W = pwm_pkg::DUTY_W_DEF
) (
  input  logic [DUTY_W-1:0] carrier_msb,
  input  logic [DUTY_W-1:0] duty,
  output logic              pwm
);

  always_comb begin
    pwm = duty > carrier_msb;
  end

endmodule
