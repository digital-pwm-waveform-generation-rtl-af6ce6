// Adder-based PWM generator with phase-shifted carriers (top level).
//
// A sawtooth carrier is built by a phase accumulator, not a counter. Every
// clock the phase adder adds the phase increment register to the
// accumulator, which wraps modulo 2^ACC_W. The period is set by the slope
// (the increment), not by a terminal count, so the carrier always spans the
// full range:
//   f_pwm = increment * f_clk / 2^ACC_W
// and the PWM gain and resolution (DUTY_W bits) do not depend on f_pwm or
// f_clk. When 2^ACC_W is not a multiple of the increment, the period
// alternates between the two nearest whole numbers of clocks and averages to
// the exact frequency.
//
// NUM_CARRIERS carriers are made from the one accumulator by adding fixed
// offsets k * 2^ACC_W / NUM_CARRIERS (added, not accumulated). Each carrier's
// DUTY_W MSBs go to its own greater-than comparator against the shared duty
// register. pwm_out[k] is the PWM of carrier k. Bit 0 (offset 0) is the plain
// single-carrier generator. The four outputs of the default configuration
// drive the four cells of a five-level converter.
//
// Interface and timing:
//   inc_load / inc_in   : write the phase increment (takes effect from the
//                         next clock edge on).
//   duty_load / duty_in : write the duty value (acts immediately, with no
//                         wait for a period boundary).
//   phase               : accumulator value (base carrier).
//   wrap                : adder carry; high in a cycle whose next clock edge
//                         makes the accumulator overflow.
//   pwm_out             : combinational from the registered phase and duty.
// Reset (asynchronous, active low) clears increment, duty and phase to 0.
// The datapath, the widths (16-bit accumulator, 8-bit duty and comparator)
// and the offset scheme follow the reference design. The shared duty
// register, immediate duty update, reset values and the `wrap` output are
// this design's choices.
module adder_pwm_gen
  import pwm_pkg::*;
#(
  parameter int unsigned ACC_W        = ACC_W_DEF,
  parameter int unsigned DUTY_W       = DUTY_W_DEF,
  parameter int unsigned NUM_CARRIERS = NUM_CARRIERS_DEF
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    inc_load,
  input  logic [ACC_W-1:0]        inc_in,
  input  logic                    duty_load,
  input  logic [DUTY_W-1:0]       duty_in,
  output logic [ACC_W-1:0]        phase,
  output logic                    wrap,
  output logic [NUM_CARRIERS-1:0] pwm_out
);

  initial begin
    assert (NUM_CARRIERS >= 1 && ((1 << ACC_W) % NUM_CARRIERS) == 0)
      else $error("adder_pwm_gen: NUM_CARRIERS (%0d) must divide 2^ACC_W", NUM_CARRIERS);
    assert (DUTY_W <= ACC_W)
      else $error("adder_pwm_gen: DUTY_W (%0d) must not exceed ACC_W (%0d)", DUTY_W, ACC_W);
  end

  logic [ACC_W-1:0]  inc;
  logic [ACC_W-1:0]  next_phase;
  logic [DUTY_W-1:0] duty;

  phase_increment_reg #(.ACC_W(ACC_W)) u_inc_reg (
    .clk  (clk),
    .rst_n(rst_n),
    .load (inc_load),
    .d    (inc_in),
    .q    (inc)
  );

  phase_adder #(.ACC_W(ACC_W)) u_adder (
    .a    (inc),
    .b    (phase),
    .sum  (next_phase),
    .carry(wrap)
  );

  phase_accumulator #(.ACC_W(ACC_W)) u_acc (
    .clk  (clk),
    .rst_n(rst_n),
    .d    (next_phase),
    .q    (phase)
  );

  duty_reg #(.DUTY_W(DUTY_W)) u_duty_reg (
    .clk  (clk),
    .rst_n(rst_n),
    .load (duty_load),
    .d    (duty_in),
    .q    (duty)
  );

  for (genvar k = 0; k < NUM_CARRIERS; k++) begin : g_carrier
    localparam logic [ACC_W:0]   SPAN   = {1'b1, {ACC_W{1'b0}}};
    localparam logic [ACC_W-1:0] OFFSET = ACC_W'((SPAN / (ACC_W+1)'(NUM_CARRIERS)) * (ACC_W+1)'(k));

    // Full-width shifted carrier; only its DUTY_W MSBs reach the
    // comparator, so the lower bits are intentionally left unused.
    logic [ACC_W-1:0] carrier;

    carrier_offset_adder #(.ACC_W(ACC_W), .OFFSET(OFFSET)) u_offset (
      .phase  (phase),
      .carrier(carrier)
    );

    pwm_comparator #(.DUTY_W(DUTY_W)) u_cmp (
      .carrier_msb(carrier[ACC_W-1 -: DUTY_W]),
      .duty       (duty),
      .pwm        (pwm_out[k])
    );
  end

endmodule
