// Shared constants of the adder-based PWM generator.
//
// The generator builds its sawtooth carrier with a phase accumulator (as in a
// direct digital synthesis core) instead of a counter: every clock the phase
// increment is added to the accumulator, which wraps modulo 2^ACC_W, and the
// top DUTY_W bits of the (optionally phase-shifted) accumulator are compared
// with a duty value. The default sizes below are the reference configuration:
// a 16-bit accumulator, an 8-bit duty register and comparator, and four
// equally spaced carriers for a five-level multilevel converter.
package pwm_pkg;

  // Phase accumulator / adder / phase increment width.
  localparam int unsigned ACC_W_DEF        = 16;
  // PWM duty register and comparator width.
  localparam int unsigned DUTY_W_DEF       = 8;
  // Number of phase-shifted carriers (one PWM output each).
  localparam int unsigned NUM_CARRIERS_DEF = 4;

endpackage
