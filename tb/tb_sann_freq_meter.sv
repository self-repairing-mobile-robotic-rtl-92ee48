// tb_sann_freq_meter: self-checking testbench of the spike frequency meter.
// Uses a 20-step window. Random spikes are counted here per window and the
// output is checked every step: it must show the previous window's count,
// change only at window ends, and saturate at the maximum count.
module tb_sann_freq_meter;
  localparam int WIN = 20, FW = 4;
  logic clk = 1'b0, rst_n = 1'b1, en = 1'b0, spike = 1'b0;
  logic [FW-1:0] freq;
  int checks = 0, failures = 0;

  sann_freq_meter #(.WIN_STEPS(WIN), .FREQ_W(FW)) dut (.clk, .rst_n, .en, .spike, .freq);

  always #5 clk = ~clk;

  // drive a falling reset edge so the asynchronous reset really fires
  initial #1 rst_n = 1'b0;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
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

  int cnt, shown, pos;

  task automatic step(bit s);
    spike = s;
    en = 1'b1;
    @(negedge clk);
    en = 1'b0;
    spike = 1'b0;
    if (s) cnt++;
    pos++;
    if (pos == WIN) begin
      shown = (cnt > 15) ? 15 : cnt;
      cnt = 0;
      pos = 0;
    end
    check(freq == FW'(shown), $sformatf("freq got %0d want %0d", freq, shown));
  endtask

  initial begin
    cnt = 0; shown = 0; pos = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int i = 0; i < 400; i++) step($urandom_range(99) < 30);
    // en low: nothing moves
    spike = 1'b1;
    repeat (5) @(negedge clk);
    spike = 1'b0;
    check(freq == FW'(shown), "holds without en");
    for (int i = 0; i < 100; i++) step(1'b1);   // saturation at 15
    check(freq == 4'd15, "saturates");
    for (int i = 0; i < 100; i++) step((i % 4) == 0);
    check(freq == 4'd5, "5 spikes per window");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
