// Self-checking testbench for carrier_offset_adder.
//
// Instantiates the four offsets of a four-carrier, 16-bit configuration
// (0, 16384, 32768, 49152), the 8-bit offset 64 and the default instance. Applies random and
// wrapping phases and checks each shifted carrier against
// (phase + offset) mod 2^W worked out in the testbench.
module tb_carrier_offset_adder;
  localparam logic [15:0] OFFS [4] = '{16'd0, 16'd16384, 16'd32768, 16'd49152};

  logic [15:0] phase;
  logic [15:0] carrier [4];
  logic [7:0]  phase8, carrier8;
  int unsigned checks = 0, failures = 0;

  for (genvar k = 0; k < 4; k++) begin : g_off
    carrier_offset_adder #(.ACC_W(16), .OFFSET(OFFS[k])) dut (.phase(phase), .carrier(carrier[k]));
  end
  carrier_offset_adder #(.ACC_W(8), .OFFSET(8'd64)) dut8 (.phase(phase8), .carrier(carrier8));
  // Default parameters: 16 bits, a quarter-period offset.
  logic [15:0] carrier_def;
  carrier_offset_adder dut_def (.phase(phase), .carrier(carrier_def));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("FAIL watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 3000; i++) begin
      int unsigned p;
      p = (i < 4) ? 32'(16'hFFFF - 16'(i)) : $urandom_range(0, 65535);
      phase  = 16'(p);
      phase8 = 8'(p);
      #1;
      for (int k = 0; k < 4; k++) begin
        int unsigned e;
        e = (p + k * 16384) % 65536;
        checks++;
        if (carrier[k] !== 16'(e)) begin
          failures++;
          $display("FAIL offset %0d phase %0d: got %0d expected %0d", OFFS[k], p, carrier[k], e);
        end
      end
      checks++;
      if (carrier_def !== 16'((p + 16384) % 65536)) begin
        failures++;
        $display("FAIL default offset phase %0d: got %0d", p, carrier_def);
      end
      checks++;
      if (carrier8 !== 8'((p % 256 + 64) % 256)) begin
        failures++;
        $display("FAIL 8-bit offset 64 phase %0d: got %0d", p % 256, carrier8);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
