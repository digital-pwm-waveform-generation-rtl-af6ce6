// Self-checking testbench for phase_accumulator.
//
// Holds reset and checks the phase is 0. Then feeds a random next-phase
// every clock and checks that q shows it right after each rising edge, i.e.
// that the register loads every cycle with no enable. Finally closes the
// loop through a testbench-side adder with increment 6 on an 8-bit copy and
// checks the first values 0, 6, 12, 18.
module tb_phase_accumulator;
  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic [15:0] d = '0, q;
  logic [7:0]  d8, q8;
  int unsigned checks = 0, failures = 0;

  phase_accumulator #(.ACC_W(16)) dut   (.clk(clk), .rst_n(rst_n), .d(d), .q(q));
  phase_accumulator #(.ACC_W(8))  dut8  (.clk(clk), .rst_n(rst_n), .d(d8), .q(q8));

  assign d8 = q8 + 8'd6;

  always #5 clk = ~clk;

  initial begin : watchdog
    #200000;
    failures++;
    $display("FAIL watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d = 16'h1234;
    @(posedge clk); #1;
    checks++;
    if (q !== '0 || q8 !== '0) begin failures++; $display("FAIL reset: q=%0h q8=%0h", q, q8); end
    @(negedge clk) rst_n = 1'b1;
    for (int i = 0; i < 4; i++) begin
      checks++;
      if (q8 !== 8'(6 * i)) begin failures++; $display("FAIL 8-bit sequence step %0d: %0d", i, q8); end
      @(posedge clk); #1;
    end
    for (int i = 0; i < 3000; i++) begin
      logic [15:0] v;
      @(negedge clk);
      v = 16'($urandom);
      d = v;
      @(posedge clk); #1;
      checks++;
      if (q !== v) begin failures++; $display("FAIL load %0d: q=%0h expected %0h", i, q, v); end
    end
    rst_n = 1'b0;
    #1;
    checks++;
    if (q !== '0) begin failures++; $display("FAIL async reset: q=%0h", q); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
