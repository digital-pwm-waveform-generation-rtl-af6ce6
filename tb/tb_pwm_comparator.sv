// Self-checking testbench for pwm_comparator.
//
// Exhaustive over all 8-bit duty and carrier-MSB pairs: the output must be
// high exactly when duty > carrier. Over one full sweep of the carrier the
// number of high cycles must equal the duty value (duty D gives D/256), and
// duty 0 must never produce a pulse.
module tb_pwm_comparator;
  logic [7:0]  carrier_msb, duty;
  logic        pwm;
  int unsigned checks = 0, failures = 0;

  pwm_comparator #(.DUTY_W(8)) dut (.carrier_msb(carrier_msb), .duty(duty), .pwm(pwm));

  initial begin : watchdog
    #10000000;
    failures++;
    $display("FAIL watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int dv = 0; dv < 256; dv++) begin
      int unsigned high;
      high = 0;
      duty = 8'(dv);
      for (int c = 0; c < 256; c++) begin
        carrier_msb = 8'(c);
        #1;
        checks++;
        if (pwm !== (dv > c)) begin
          failures++;
          $display("FAIL duty=%0d carrier=%0d pwm=%0b", dv, c, pwm);
        end
        high += pwm;
      end
      checks++;
      if (high != dv) begin
        failures++;
        $display("FAIL duty=%0d: %0d high cycles over one sweep", dv, high);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
