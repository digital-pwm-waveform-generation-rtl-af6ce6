// Phase accumulator register.
//
// ACC_W-bit register, clocked every cycle, that stores the adder's sum. Its
// value is the base sawtooth carrier: it rises by the phase increment each
// clock and wraps modulo 2^ACC_W. There is no enable; the carrier is stopped
// by writing an increment of 0.
//
// Interface: `d` is taken at every rising edge of `clk` and shown on `q`.
// The asynchronous active-low reset clears the phase to 0, so the carrier
// sequence starts 0, inc, 2*inc, ... The width follows the reference block
// diagram; the reset value is this design's choice.
module phase_accumulator #(
  parameter int unsigned ACC_W = pwm_pkg::ACC_W_DEF
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [ACC_W-1:0] d,
  output logic [ACC_W-1:0] q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q <= '0;
    else        q <= d;
  end

endmodule
