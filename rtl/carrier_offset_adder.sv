// Carrier phase-offset adder.
//
// Forms a phase-shifted copy of the base carrier by adding a fixed OFFSET to
// the accumulator value modulo 2^ACC_W. The offset is added, not
// accumulated: the accumulator itself is unchanged, so all shifted carriers
// keep the same slope, amplitude and frequency as the base carrier and stay
// locked to it. For N equally spaced carriers of a multilevel converter the
// offsets are k * 2^ACC_W / N (for an 8-bit accumulator and N = 4: 0, 64,
// 128, 192).
//
// The default OFFSET is a quarter of the accumulator range (16384 for 16
// bits), the first shifted carrier of a four-carrier set; the top sets each
// instance's offset explicitly.
//
// Purely combinational: `carrier` follows `phase` in the same cycle.
module carrier_offset_adder #(
  parameter int unsigned      ACC_W  = pwm_pkg::ACC_W_DEF,
  parameter logic [ACC_W-1:0] OFFSET = ACC_W'(1) << (ACC_W - 2)
) (
  input  logic [ACC_W-1:0] phase,
  output logic [ACC_W-1:0] carrier
);

  always_comb begin
    carrier = phase + OFFSET;
  end

endmodule
