// Testbench for adder_pwm_gen with a 32-bit phase accumulator.
//
// With a 32-bit accumulator and a 1 MHz clock the frequency step is
// 1e6 / 2^32 = 0.00023 Hz. The increment 94 437 741 = round(21 988 Hz *
// 2^32 / 1 MHz) is loaded and the design is run for 1 000 000 clocks
// (one second). The testbench checks the phase and all four PWM outputs
// every clock against a 64-bit model. It also checks that the number of
// carrier periods equals floor(increment * 1e6 / 2^32) = 21 988, and that
// every period is 45 or 46 clocks. Finally the increment is raised by one
// count, and the change must add exactly 1 to the phase.
module tb_adder_pwm_wide;
  localparam int unsigned AW = 32;
  localparam int unsigned DW = 8;
  localparam int unsigned NC = 4;
  localparam longint unsigned INC = 64'd94437741;

  logic          clk = 1'b0;
  logic          rst_n = 1'b0;
  logic          inc_load = 1'b0;
  logic [AW-1:0] inc_in = '0;
  logic          duty_load = 1'b0;
  logic [DW-1:0] duty_in = '0;
  logic [AW-1:0] phase;
  logic          wrap;
  logic [NC-1:0] pwm_out;

  longint unsigned m_phase = 0, m_inc = 0;
  logic [DW-1:0]   m_duty = '0;
  int unsigned     checks = 0, failures = 0, n_wrap = 0, since_wrap = 0, bad_period = 0;

  adder_pwm_gen #(.ACC_W(AW), .DUTY_W(DW), .NUM_CARRIERS(NC)) dut (
    .clk(clk), .rst_n(rst_n), .inc_load(inc_load), .inc_in(inc_in),
    .duty_load(duty_load), .duty_in(duty_in), .phase(phase), .wrap(wrap),
    .pwm_out(pwm_out)
  );

  always #5 clk = ~clk;

  task automatic fail(input string msg);
    failures++;
    if (failures < 20) $display("FAIL %s (t=%0t)", msg, $time);
  endtask

  always @(negedge clk) if (rst_n) begin
    logic [NC-1:0] exp;
    for (int k = 0; k < NC; k++) begin
      longint unsigned c;
      c = (m_phase + longint'(k) * 64'h4000_0000) & 64'hFFFF_FFFF;
      exp[k] = m_duty > DW'(c >> (AW - DW));
    end
    checks++;
    if (phase !== AW'(m_phase)) fail($sformatf("phase %0d expected %0d", phase, m_phase));
    checks++;
    if (pwm_out !== exp) fail($sformatf("pwm_out %b expected %b", pwm_out, exp));
  end

  always @(posedge clk) if (rst_n) begin
    since_wrap++;
    if (wrap) begin
      if (n_wrap > 0 && since_wrap != 45 && since_wrap != 46) bad_period++;
      n_wrap++;
      since_wrap = 0;
    end
    m_phase <= (m_phase + m_inc) & 64'hFFFF_FFFF;
    if (inc_load)  m_inc  <= longint'(inc_in);
    if (duty_load) m_duty <= duty_in;
  end

  initial begin : watchdog
    #30000000;
    fail("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint unsigned ph0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    duty_load = 1'b1; duty_in = 8'd180;
    inc_load  = 1'b1; inc_in  = AW'(INC);
    @(negedge clk);
    duty_load = 1'b0; inc_load = 1'b0;
    n_wrap = 0;
    repeat (1000000) @(negedge clk);
    checks++;
    if (longint'(n_wrap) != (INC * 1000000) >> 32)
      fail($sformatf("%0d periods in 1 s, expected %0d", n_wrap, (INC * 1000000) >> 32));
    checks++;
    if (bad_period != 0) fail($sformatf("%0d periods not 45 or 46 clocks", bad_period));
    $display("32-bit accumulator: %0d carrier periods in 1 s at increment %0d", n_wrap, INC);
    // One-count change of the increment: 0.00023 Hz step.
    inc_load = 1'b1; inc_in = AW'(INC + 1);
    @(negedge clk);
    inc_load = 1'b0;
    ph0 = longint'(phase);
    @(negedge clk);
    checks++;
    if (longint'(phase) != ((ph0 + INC + 1) & 64'hFFFF_FFFF)) fail("increment + 1 not applied");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
