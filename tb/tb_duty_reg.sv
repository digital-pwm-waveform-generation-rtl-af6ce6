// Self-checking testbench for duty_reg: a load-enabled register.
//
// Drives random data with a random load strobe for 2000 clocks and checks
// that q takes d at the clock edge where load is high and holds its value
// otherwise. Also checks the asynchronous reset to 0, both at start-up and
// when it is asserted mid-run. A model register kept in the testbench gives
// the expected values.
module tb_duty_reg;
  localparam int unsigned W = 8;

  logic         clk = 1'b0;
  logic         rst_n = 1'b0;
  logic         load = 1'b0;
  logic [W-1:0] d = '0;
  logic [W-1:0] q;
  logic [W-1:0] model;
  int unsigned  checks = 0, failures = 0, loads = 0;

  duty_reg #(.DUTY_W(W)) dut (.clk(clk), .rst_n(rst_n), .load(load), .d(d), .q(q));

  always #5 clk = ~clk;

  task automatic check(input logic [W-1:0] exp, input string what);
    checks++;
    if (q !== exp) begin
      failures++;
      $display("FAIL %s: q=%0h expected %0h at %0t", what, q, exp, $time);
    end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("FAIL watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(posedge clk);
    #1 check('0, "reset value");
    @(negedge clk) rst_n = 1'b1;
    model = '0;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      load = ($urandom_range(0, 2) == 0);
      d    = W'($urandom);
      if (i == 1000) begin
        // mid-run asynchronous reset
        rst_n = 1'b0;
        #1 check('0, "async reset");
        model = '0;
        @(negedge clk);
        rst_n = 1'b1;
        load = 1'b1;
        d    = W'($urandom);
      end
      @(posedge clk);
      if (load) begin
        model = d;
        loads++;
      end
      #1 check(model, load ? "load" : "hold");
    end
    if (loads < 100) begin
      failures++;
      $display("FAIL too few loads exercised: %0d", loads);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
