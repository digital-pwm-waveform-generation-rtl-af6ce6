// Full-size testbench for adder_pwm_gen at its default parameters
// (16-bit accumulator, 8-bit duty, four carriers), clocked as a 1 MHz
// module clock (one loop iteration = one microsecond).
//
// 1. Constant duty, odd increment 1441 (21 988 Hz carrier): over the
//    65536-clock sequence every phase value occurs once, so each output is
//    high for exactly duty*256 clocks; the accumulator wraps exactly 1441
//    times, and every period is 45 or 46 clocks.
// 2. A 50 Hz sine reference of 0.9 modulation depth, loaded into the duty
//    register every clock for one full 20 ms cycle. The mean of the four
//    outputs over each 1 ms window must follow the mean duty of that window.
//    All five levels of the summed output must occur.
// 3. The increment is changed to 2883 (about 44 kHz) and back; the period
//    must follow within one period.
// Every cycle each pwm_out bit is compared with a model computed here.
module tb_adder_pwm_full;
  localparam int unsigned AW = 16;
  localparam int unsigned DW = 8;
  localparam int unsigned NC = 4;

  logic          clk = 1'b0;
  logic          rst_n = 1'b0;
  logic          inc_load = 1'b0;
  logic [AW-1:0] inc_in = '0;
  logic          duty_load = 1'b0;
  logic [DW-1:0] duty_in = '0;
  logic [AW-1:0] phase;
  logic          wrap;
  logic [NC-1:0] pwm_out;

  logic [AW-1:0] m_inc = '0, m_phase = '0;
  logic [DW-1:0] m_duty = '0;

  int unsigned checks = 0, failures = 0;
  int unsigned n_wrap = 0, n_inc_change = 0, n_duty_load = 0, n_full_res = 0;
  int unsigned level_seen [NC+1];
  int unsigned since_wrap = 0, last_period = 0;

  adder_pwm_gen dut (
    .clk(clk), .rst_n(rst_n), .inc_load(inc_load), .inc_in(inc_in),
    .duty_load(duty_load), .duty_in(duty_in), .phase(phase), .wrap(wrap),
    .pwm_out(pwm_out)
  );

  always #5 clk = ~clk;

  function automatic logic [NC-1:0] model_pwm(logic [AW-1:0] ph, logic [DW-1:0] du);
    logic [NC-1:0] r;
    for (int k = 0; k < NC; k++) begin
      logic [AW-1:0] c;
      c = ph + AW'(k * (65536 / NC));
      r[k] = du > c[AW-1 -: DW];
    end
    return r;
  endfunction

  task automatic fail(input string msg);
    failures++;
    if (failures < 20) $display("FAIL %s (t=%0t)", msg, $time);
  endtask

  always @(negedge clk) if (rst_n) begin
    checks++;
    if (phase !== m_phase) fail($sformatf("phase=%0d expected %0d", phase, m_phase));
    checks++;
    if (pwm_out !== model_pwm(m_phase, m_duty))
      fail($sformatf("pwm_out=%b expected %b", pwm_out, model_pwm(m_phase, m_duty)));
    checks++;
    if (wrap !== ((int'(m_phase) + int'(m_inc)) > 65535)) fail("wrap flag");
    level_seen[$countones(pwm_out)]++;
  end

  always @(posedge clk) if (rst_n) begin
    since_wrap++;
    if (wrap) begin
      n_wrap++;
      last_period = since_wrap;
      since_wrap = 0;
    end
    m_phase <= m_phase + m_inc;
    if (inc_load) begin
      m_inc <= inc_in;
      if (inc_in != m_inc) n_inc_change++;
    end
    if (duty_load) begin
      m_duty <= duty_in;
      n_duty_load++;
    end
  end

  task automatic write_inc(input logic [AW-1:0] v);
    inc_load = 1'b1; inc_in = v;
    @(negedge clk);
    inc_load = 1'b0;
  endtask

  task automatic write_duty(input logic [DW-1:0] v);
    duty_load = 1'b1; duty_in = v;
    @(negedge clk);
    duty_load = 1'b0;
  endtask

  initial begin : watchdog
    #3000000;
    fail("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned highs [NC];
    int unsigned wraps0;
    for (int l = 0; l <= NC; l++) level_seen[l] = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;

    // --- 1. Constant duty, increment 1441 over the full sequence -------
    write_duty(8'd77);
    write_inc(16'd1441);
    wraps0 = n_wrap;
    for (int k = 0; k < NC; k++) highs[k] = 0;
    for (int i = 0; i < 65536; i++) begin
      for (int k = 0; k < NC; k++) highs[k] += pwm_out[k];
      if (i > 0 && phase == m_phase && phase == '0) fail("sequence repeated early");
      if (wrap && n_wrap > wraps0 + 1) begin
        checks++;
        if (last_period != 45 && last_period != 46) fail($sformatf("period %0d clocks", last_period));
      end
      @(negedge clk);
    end
    checks++;
    if (phase !== 16'd0) fail($sformatf("phase after 65536 steps %0d, expected 0", phase));
    checks++;
    if (n_wrap - wraps0 != 1441) fail($sformatf("%0d wraps in 65536 clocks, expected 1441", n_wrap - wraps0));
    $display("increment 1441: %0d wraps in 65536 us -> %0.1f Hz", n_wrap - wraps0,
             real'(n_wrap - wraps0) * 1.0e6 / 65536.0);
    for (int k = 0; k < NC; k++) begin
      checks++;
      if (highs[k] != 77 * 256) fail($sformatf("carrier %0d high %0d, expected %0d", k, highs[k], 77 * 256));
    end
    n_full_res++;

    // --- 2. 50 Hz sine, 0.9 modulation depth, one 20 ms cycle ---------
    begin
      real win_pwm, win_duty, worst;
      worst = 0.0;
      win_pwm = 0.0; win_duty = 0.0;
      for (int i = 0; i < 20000; i++) begin
        real ref_v;
        ref_v = 128.0 + 0.9 * 128.0 * $sin(2.0 * 3.14159265358979 * 50.0 * real'(i) * 1.0e-6);
        duty_load = 1'b1;
        duty_in = 8'($rtoi(ref_v + 0.5));
        @(negedge clk);
        win_duty += real'(m_duty) / 256.0;
        win_pwm  += real'($countones(pwm_out)) / 4.0;
        if (i % 1000 == 999) begin
          real err;
          err = (win_pwm - win_duty) / 1000.0;
          if (err < 0.0) err = -err;
          if (err > worst) worst = err;
          checks++;
          if (err > 0.01) fail($sformatf("1 ms window %0d: pwm mean %0.4f duty mean %0.4f",
                                         i / 1000, win_pwm / 1000.0, win_duty / 1000.0));
          win_pwm = 0.0; win_duty = 0.0;
        end
      end
      duty_load = 1'b0;
      $display("50 Hz sine: worst 1 ms window error of the four-carrier mean %0.4f", worst);
    end

    // --- 3. Frequency change on the fly --------------------------------
    write_inc(16'd2883);
    repeat (60) @(negedge clk);
    repeat (200) begin
      if (wrap) begin
        checks++;
        if (last_period != 22 && last_period != 23) fail($sformatf("increment 2883 period %0d", last_period));
      end
      @(negedge clk);
    end
    write_inc(16'd1441);
    repeat (100) @(negedge clk);
    repeat (400) begin
      if (wrap) begin
        checks++;
        if (last_period != 45 && last_period != 46) fail($sformatf("increment 1441 period %0d", last_period));
      end
      @(negedge clk);
    end

    $display("wraps=%0d inc_changes=%0d duty_loads=%0d full_res_windows=%0d levels=%p",
             n_wrap, n_inc_change, n_duty_load, n_full_res, level_seen);
    checks++; if (n_wrap == 0)       fail("no accumulator wrap");
    checks++; if (n_inc_change < 3)  fail("too few increment changes");
    checks++; if (n_duty_load == 0)  fail("no duty load");
    checks++; if (n_full_res == 0)   fail("no full-resolution window");
    for (int l = 0; l <= NC; l++) begin
      checks++;
      if (level_seen[l] == 0) fail($sformatf("output level %0d never reached", l));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
