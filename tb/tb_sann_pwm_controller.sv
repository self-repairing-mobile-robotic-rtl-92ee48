// tb_sann_pwm_controller: self-checking testbench of the PWM controller.
// With PRESCALE = 3 (CLK_HZ = 500*256*3) one period is 768 cycles. For a set of
// duty values it measures the period between period_start pulses and the high
// time per period, which must be duty*3 cycles. A duty change inside a period
// only takes effect in the next one.
module tb_sann_pwm_controller;
  localparam int PS = 3;
  logic clk = 1'b0, rst_n = 1'b1, pwm, period_start;
  logic [7:0] duty = '0;
  int checks = 0, failures = 0;

  sann_pwm_controller #(.CLK_HZ(500 * 256 * PS), .PWM_HZ(500)) dut (.clk, .rst_n, .duty, .pwm, .period_start);

  always #5 clk = ~clk;

  // drive a falling reset edge so the asynchronous reset really fires
  initial #1 rst_n = 1'b0;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // count cycles and high cycles between consecutive period_start pulses
  task automatic measure(output int len, output int hi);
    len = 0; hi = 0;
    do begin
      @(posedge clk);
      len++;
      if (pwm) hi++;
    end while (!period_start);
  endtask

  initial begin
    int len, hi;
    int duties[8] = '{0, 1, 51, 102, 128, 200, 254, 255};
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    measure(len, hi);   // align to a period boundary
    foreach (duties[i]) begin
      duty = 8'(duties[i]);
      measure(len, hi);  // duty taken at the end of this period
      measure(len, hi);
      check(len == 256 * PS, $sformatf("period %0d cycles", len));
      check(hi == duties[i] * PS, $sformatf("duty %0d: high %0d cycles want %0d", duties[i], hi, duties[i] * PS));
    end
    // mid-period change is deferred
    duty = 8'd64;
    measure(len, hi);
    measure(len, hi);
    repeat (100) @(posedge clk);
    duty = 8'd192;
    measure(len, hi);
    check(hi > 64 * PS - 110 && hi < 64 * PS - 90, $sformatf("change inside a period is deferred: %0d", hi));
    measure(len, hi);
    check(hi == 192 * PS, "new duty in the next period");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
