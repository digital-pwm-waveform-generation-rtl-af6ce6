// Phase adder.
//
// ACC_W-bit adder that forms the next phase: sum = a + b modulo 2^ACC_W,
// where `a` is the phase increment and `b` the current accumulator value.
// The modulo wrap is what makes the carrier a sawtooth of fixed amplitude:
// on overflow the phase does not return to zero but to the remainder, so
// successive carrier periods differ by one clock and average to the exact
// frequency. `carry` is the adder's carry out; it is high in exactly the
// cycles whose sum overflows, i.e. once per carrier period.
//
// Purely combinational. The 16-bit width follows the reference block diagram;
// bringing out the carry is this design's choice.
module phase_adder #(
  parameter int unsigned ACC_W = pwm_pkg::ACC_W_DEF
) (
  input  logic [ACC_W-1:0] a,
  input  logic [ACC_W-1:0] b,
  output logic [ACC_W-1:0] sum,
  output logic             carry
);

  always_comb begin
    {carry, sum} = {1'b0, a} + {1'b0, b};
  end

endmodule
