// tb_sann_spike_to_pwm: self-checking testbench of the frequency-to-duty map.
// Every input value is applied and the registered duty compared with the
// staircase written here: 0 below 5 Hz, 51 (20 %) for 5-6 Hz, 102 (40 %) from
// 7 Hz on, with inputs above 10 Hz clamped.
module tb_sann_spike_to_pwm;
  logic clk = 1'b0, rst_n = 1'b1;
  logic [8:0] favg = '0;
  logic [7:0] duty;
  int checks = 0, failures = 0;

  sann_spike_to_pwm dut (.clk, .rst_n, .favg, .duty);

  always #5 clk = ~clk;

  // drive a falling reset edge so the asynchronous reset really fires
  initial #1 rst_n = 1'b0;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
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

  initial begin
    int want;
    repeat (2) @(posedge clk);
    check(duty == 0, "reset");
    rst_n = 1'b1;
    for (int f = 0; f < 512; f++) begin
      favg = 9'(f);
      @(negedge clk);   // one clock of latency
      want = (f < 5) ? 0 : (f < 7) ? 51 : 102;
      check(duty == 8'(want), $sformatf("f'=%0d duty %0d want %0d", f, duty, want));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
