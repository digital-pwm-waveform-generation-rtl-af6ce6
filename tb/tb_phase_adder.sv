// Self-checking testbench for phase_adder.
//
// Applies random and corner-case operand pairs to the default 16-bit adder
// and to an 8-bit copy. It checks the modulo-2^W sum and the carry out
// against a wider integer sum worked out in the testbench. The 8-bit copy is
// also given the phase sequence of a 1 MHz, 22 kHz example (increment 6):
// it must wrap from 252 to 2, then from 254 to 4.
module tb_phase_adder;
  logic [15:0] a16, b16, s16;
  logic        c16;
  logic [7:0]  a8, b8, s8;
  logic        c8;
  int unsigned checks = 0, failures = 0;

  phase_adder #(.ACC_W(16)) dut16 (.a(a16), .b(b16), .sum(s16), .carry(c16));
  phase_adder #(.ACC_W(8))  dut8  (.a(a8),  .b(b8),  .sum(s8),  .carry(c8));

  task automatic apply16(input logic [15:0] x, input logic [15:0] y);
    int unsigned full;
    a16 = x; b16 = y;
    #1;
    full = int'(x) + int'(y);
    checks++;
    if (s16 !== full[15:0] || c16 !== full[16]) begin
      failures++;
      $display("FAIL 16-bit %0d+%0d: sum=%0d carry=%0b expected %0d/%0b", x, y, s16, c16, full[15:0], full[16]);
    end
  endtask

  task automatic apply8(input logic [7:0] x, input logic [7:0] y);
    int unsigned full;
    a8 = x; b8 = y;
    #1;
    full = int'(x) + int'(y);
    checks++;
    if (s8 !== full[7:0] || c8 !== full[8]) begin
      failures++;
      $display("FAIL 8-bit %0d+%0d: sum=%0d carry=%0b expected %0d/%0b", x, y, s8, c8, full[7:0], full[8]);
    end
  endtask

  initial begin : watchdog
    #1000000;
    failures++;
    $display("FAIL watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    apply16(16'hFFFF, 16'h0001);
    apply16(16'hFFFF, 16'hFFFF);
    apply16(16'h0000, 16'h0000);
    apply16(16'h8000, 16'h8000);
    apply16(16'd1441, 16'd64095);
    for (int i = 0; i < 5000; i++) apply16(16'($urandom), 16'($urandom));
    for (int x = 0; x < 256; x++)
      for (int y = 0; y < 256; y += 5) apply8(8'(x), 8'(y));
    // Wrap points of the increment-6 example sequence.
    apply8(8'd6, 8'd252);
    checks++;
    if (s8 !== 8'd2 || !c8) begin failures++; $display("FAIL 252+6 should wrap to 2"); end
    apply8(8'd6, 8'd254);
    checks++;
    if (s8 !== 8'd4 || !c8) begin failures++; $display("FAIL 254+6 should wrap to 4"); end
    apply8(8'd6, 8'd246);
    checks++;
    if (s8 !== 8'd252 || c8) begin failures++; $display("FAIL 246+6 should not wrap"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
