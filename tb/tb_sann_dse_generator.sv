// tb_sann_dse_generator: self-checking testbench of the 2-AG/DSE generator.
// A reference written here decays 2-AG by 1/2^14 per step and adds 1.0 per
// spike; DSE must equal -1.75 * 2-AG. Checks every step under random spiking,
// then that a steady 7 Hz train drives DSE to about -200 % and that DSE relaxes
// toward 0 once spiking stops.
module tb_sann_dse_generator;
  import sann_pkg::*;
  logic clk = 1'b0, rst_n = 1'b1, en = 1'b0, spike = 1'b0;
  fx_t  ag, dse;
  int checks = 0, failures = 0;

  sann_dse_generator dut (.clk, .rst_n, .en, .spike, .ag, .dse);

  always #5 clk = ~clk;

  // drive a falling reset edge so the asynchronous reset really fires
  initial #1 rst_n = 1'b0;

  initial begin : watchdog
    repeat (600000) @(posedge clk);
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

  localparam longint ONE = 64'sd1 << 24;
  longint rag;

  task automatic step(bit s, bit chk);
    rag = rag - (rag >>> 14) + (s ? ONE : 0);
    spike = s;
    en = 1'b1;
    @(negedge clk);
    en = 1'b0;
    if (chk) begin
      check(longint'(ag) == rag, $sformatf("ag got %0d want %0d", ag, rag));
      check(longint'(dse) == ((-(7 * ONE / 4)) * rag) >>> 24, "dse = K_AG * ag");
    end
  endtask

  initial begin
    rag = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(ag == 0 && dse == 0, "reset");
    for (int i = 0; i < 5000; i++) step($urandom_range(99) < 3, 1'b1);
    // 7 Hz for 120 s (one spike every 143 steps); check only the end
    for (int i = 0; i < 120000; i++) step((i % 143) == 0, (i % 1000) == 0);
    check(real'(dse) / 16777216.0 < -170.0 && real'(dse) / 16777216.0 > -215.0,
          $sformatf("DSE at 7 Hz after 120 s: %f", real'(dse) / 16777216.0));
    for (int i = 0; i < 30000; i++) step(1'b0, (i % 1000) == 0);
    check(real'(dse) / 16777216.0 > -40.0, "DSE relaxes without spikes");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
