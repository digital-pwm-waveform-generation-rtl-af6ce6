// Phase increment register.
//
// Holds the phase increment that the adder adds to the phase accumulator on
// every clock. The increment sets the carrier (PWM) frequency:
//   f_pwm = increment * f_clk / 2^ACC_W
// so with a 1 MHz clock and a 16-bit accumulator an increment of 1441 gives
// 21 988 Hz. Changing it between clocks changes the carrier slope without
// changing its amplitude, which is how frequency spreading, PFM or phase
// locking of the carrier are done from outside the block.
//
// Interface: `load` is a synchronous enable; when it is high at a rising edge
// of `clk`, `d` is stored and appears on `q` after that edge. The asynchronous
// active-low reset clears the register to 0, which stops the carrier until an
// increment is written. The load strobe and 16-bit width are those of the
// reference block diagram; the reset value is this design's choice.
module phase_increment_reg #(
  parameter int unsigned ACC_W = pwm_pkg::ACC_W_DEF
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             load,
  input  logic [ACC_W-1:0] d,
  output logic [ACC_W-1:0] q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    q <= '0;
    else if (load) q <= d;
  end

endmodule
