// PWM duty register.
//
// Holds the DUTY_W-bit duty value that the comparator tests against the top
// DUTY_W bits of each carrier. Its width is independent of the accumulator
// width; because the carrier always sweeps its full range, a duty of D gives
// an average high time of D / 2^DUTY_W at any carrier frequency.
//
// Interface: `load` is a synchronous enable; `d` is stored at the rising edge
// of `clk` where `load` is high and drives `q` from then on. There is no
// shadow register: a new duty acts at once, mid-period if it arrives
// mid-period. The asynchronous active-low reset clears it to 0 (PWM low).
// The load strobe and 8-bit width follow the reference block diagram; the
// immediate update and reset value are this design's choices.
module duty_reg #(
  parameter int unsigned DUTY_W = pwm_pkg::DUTY_W_DEF
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              load,
  input  logic [DUTY_W-1:0] d,
  output logic [DUTY_W-1:0] q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    q <= '0;
    else if (load) q <= d;
  end

endmodule
