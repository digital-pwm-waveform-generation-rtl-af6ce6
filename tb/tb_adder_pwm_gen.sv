// End-to-end testbench for adder_pwm_gen at the 8-bit worked-example size.
//
// The top is built with an 8-bit accumulator, an 8-bit duty comparator and
// four carriers, so it can be checked against the hand-worked 22 kHz example
// (1 MHz clock, increment 6):
//   * the phase runs 0, 6, ..., 252, 2, 8, ..., 254, 4, ..., 250, 0;
//   * the carrier periods are 43, 43, 42 clocks, repeating;
//   * an even increment visits only even phases and repeats after 128 steps;
//   * carrier 1 is the base carrier shifted by 64 (offsets 0/64/128/192);
//   * an odd increment visits all 256 phases once per 256 clocks, so over
//     that window a duty D gives exactly D high cycles on every output;
//   * changing the increment on the fly changes the period at once, with
//     the phase carrying on from where it was.
// Every cycle each pwm_out bit is compared with a model computed here:
// duty > ((phase + k*64) mod 256). The mechanisms exercised (wrap, increment
// change, duty load, full-resolution window, each of the five output levels)
// are counted, and one that never happens counts as a failure.
module tb_adder_pwm_gen;
  localparam int unsigned AW = 8;
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

  // Model state.
  logic [AW-1:0] m_inc = '0, m_phase = '0;
  logic [DW-1:0] m_duty = '0;

  int unsigned checks = 0, failures = 0;
  int unsigned n_wrap = 0, n_inc_change = 0, n_duty_load = 0, n_full_res = 0;
  int unsigned level_seen [NC+1];
  int unsigned since_wrap = 0;
  int unsigned periods [$];

  adder_pwm_gen #(.ACC_W(AW), .DUTY_W(DW), .NUM_CARRIERS(NC)) dut (
    .clk(clk), .rst_n(rst_n), .inc_load(inc_load), .inc_in(inc_in),
    .duty_load(duty_load), .duty_in(duty_in), .phase(phase), .wrap(wrap),
    .pwm_out(pwm_out)
  );

  always #5 clk = ~clk;

  function automatic logic [NC-1:0] model_pwm(logic [AW-1:0] ph, logic [DW-1:0] du);
    logic [NC-1:0] r;
    for (int k = 0; k < NC; k++) begin
      logic [AW-1:0] c;
      c = ph + AW'(k * (256 / NC));
      r[k] = du > c[AW-1 -: DW];
    end
    return r;
  endfunction

  task automatic fail(input string msg);
    failures++;
    $display("FAIL %s (t=%0t)", msg, $time);
  endtask

  // Compare with the model just before each edge, then advance the model.
  always @(negedge clk) if (rst_n) begin
    int unsigned lvl;
    checks++;
    if (phase !== m_phase) fail($sformatf("phase=%0d expected %0d", phase, m_phase));
    checks++;
    if (pwm_out !== model_pwm(m_phase, m_duty))
      fail($sformatf("pwm_out=%b expected %b (phase %0d duty %0d)", pwm_out, model_pwm(m_phase, m_duty), m_phase, m_duty));
    checks++;
    if (wrap !== ((int'(m_phase) + int'(m_inc)) > 255)) fail("wrap flag");
    lvl = $countones(pwm_out);
    level_seen[lvl]++;
  end

  always @(posedge clk) if (rst_n) begin
    since_wrap++;
    if (wrap) begin
      n_wrap++;
      periods.push_back(since_wrap);
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
    @(negedge clk);
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
    #100000;
    fail("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned highs [NC];
    for (int l = 0; l <= NC; l++) level_seen[l] = 0;
    repeat (3) @(posedge clk);
    #1;
    checks++;
    if (phase !== '0 || pwm_out !== '0) fail("reset state");
    @(negedge clk) rst_n = 1'b1;

    // --- Worked example: increment 6, duty 128 ---------------------------
    @(negedge clk);
    write_duty(8'd128);
    // The phase has stayed at 0 (increment still 0). Load 6 and check the
    // published sequence for one full 128-step repeat.
    write_inc(8'd6);
    // write_inc returns one cycle after the edge that loaded 6: phase is 0
    // and advances by 6 on each later edge.
    begin
      int unsigned exp_seq [$];
      int unsigned v;
      v = 0;
      for (int i = 0; i < 129; i++) begin
        exp_seq.push_back(v);
        v = (v + 6) % 256;
      end
      // Spot-check the printed sequence values.
      checks++;
      if (exp_seq[41] != 246 || exp_seq[42] != 252 || exp_seq[43] != 2 || exp_seq[44] != 8 ||
          exp_seq[85] != 254 || exp_seq[86] != 4 || exp_seq[127] != 250 || exp_seq[128] != 0)
        fail("model sequence differs from the worked example");
      periods.delete();
      since_wrap = 0;
      for (int i = 0; i < 128; i++) begin
        checks++;
        if (phase !== AW'(exp_seq[i])) fail($sformatf("step %0d phase %0d expected %0d", i, phase, exp_seq[i]));
        // Only even phases with an even increment.
        checks++;
        if (phase[0]) fail("odd phase with even increment");
        // Repeats after 128 steps, not before.
        if (i > 0) begin
          checks++;
          if (phase == '0) fail($sformatf("phase back to 0 after only %0d steps", i));
        end
        // Fig. 4: the second carrier starts at 64 while the base is at 0.
        if (i == 0) begin
          checks++;
          if (pwm_out[0] !== 1'b1 || pwm_out[1] !== 1'b1 || pwm_out[2] !== 1'b0 || pwm_out[3] !== 1'b0)
            fail($sformatf("carrier offsets at phase 0: pwm_out=%b", pwm_out));
        end
        @(negedge clk);
      end
      checks++;
      if (phase !== '0) fail("sequence does not repeat after 128 steps");
      // Periods 43, 43, 42 (three wraps in 128 clocks).
      checks++;
      if (periods.size() != 3 || periods[0] != 43 || periods[1] != 43 || periods[2] != 42)
        fail($sformatf("carrier periods %p, expected 43 43 42", periods));
      else $display("increment 6: carrier periods %0d %0d %0d clocks (avg %0.2f kHz at 1 MHz)",
                    periods[0], periods[1], periods[2], 1000.0 * 3 / 128);
    end

    // --- Odd increment: full resolution in 256 clocks --------------------
    for (int t = 0; t < 6; t++) begin
      logic [DW-1:0] dv;
      dv = (t == 0) ? 8'd0 : (t == 1) ? 8'd255 : 8'($urandom);
      write_duty(dv);
      write_inc(8'(2 * $urandom_range(0, 127) + 1));
      for (int k = 0; k < NC; k++) highs[k] = 0;
      repeat (256) begin
        for (int k = 0; k < NC; k++) highs[k] += pwm_out[k];
        @(negedge clk);
      end
      for (int k = 0; k < NC; k++) begin
        checks++;
        if (highs[k] != int'(dv)) fail($sformatf("odd increment %0d: carrier %0d high %0d of 256, duty %0d", m_inc, k, highs[k], dv));
      end
      n_full_res++;
    end

    // --- On-the-fly frequency change -------------------------------------
    write_duty(8'd200);
    write_inc(8'd12);
    periods.delete();
    repeat (100) @(negedge clk);
    write_inc(8'd3);
    begin
      int unsigned fast [$];
      fast = periods;
      periods.delete();
      repeat (300) @(negedge clk);
      // Increment 12: periods of 21 or 22 clocks. Increment 3: 85 or 86.
      checks++;
      if (fast.size() < 3) fail("too few wraps at increment 12");
      for (int i = 1; i < fast.size(); i++) begin
        checks++;
        if (fast[i] != 21 && fast[i] != 22) fail($sformatf("increment 12 period %0d", fast[i]));
      end
      for (int i = 1; i < periods.size(); i++) begin
        checks++;
        if (periods[i] != 85 && periods[i] != 86) fail($sformatf("increment 3 period %0d", periods[i]));
      end
    end

    // --- Varying duty to reach every output level ------------------------
    write_inc(8'd7);
    for (int i = 0; i < 400; i++) begin
      duty_load = 1'b1;
      duty_in = 8'(128 + int'(120.0 * $sin(2.0 * 3.14159265 * i / 200.0)));
      @(negedge clk);
    end
    duty_load = 1'b0;

    // --- Mechanism coverage ---------------------------------------------
    $display("wraps=%0d inc_changes=%0d duty_loads=%0d full_res_windows=%0d levels=%p",
             n_wrap, n_inc_change, n_duty_load, n_full_res, level_seen);
    checks++; if (n_wrap == 0)       fail("no accumulator wrap");
    checks++; if (n_inc_change < 2)  fail("no increment change");
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
