// tb_sann_fmmm: self-checking testbench of the frequency moving mean module.
// With a 16-deep FIFO (K = 4) random samples are fed with random gaps; the
// reference keeps the last 16 samples here and expects favg = floor(sum/16)
// once 16 samples are in and 0 before. It also checks that done comes 2 cycles
// after each sample and that full rises with the 16th sample.
module tb_sann_fmmm;
  localparam int K = 4, FW = 9, N = 1 << K;
  logic clk = 1'b0, rst_n = 1'b1, sample_valid = 1'b0, full, done;
  logic [FW-1:0] freq = '0, favg;
  int checks = 0, failures = 0;

  sann_fmmm #(.K(K), .FREQ_W(FW)) dut (.clk, .rst_n, .sample_valid, .freq, .favg, .full, .done);

  always #5 clk = ~clk;

  // drive a falling reset edge so the asynchronous reset really fires
  initial #1 rst_n = 1'b0;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
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

  int q[$];

  task automatic sample(int v);
    int sum;
    freq = FW'(v);
    sample_valid = 1'b1;
    @(negedge clk);
    sample_valid = 1'b0;
    check(!done, "done not in cycle 1");
    @(negedge clk);
    check(done, "done 2 cycles after the sample");
    q.push_back(v);
    if (q.size() > N) void'(q.pop_front());
    sum = 0;
    foreach (q[i]) sum += q[i];
    check(full == (q.size() == N), "full flag");
    check(favg == ((q.size() == N) ? FW'(sum / N) : '0),
          $sformatf("favg got %0d want %0d (n=%0d)", favg, sum / N, q.size()));
    repeat ($urandom_range(2)) @(negedge clk);
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int i = 0; i < 2000; i++) sample($urandom_range(511));
    for (int i = 0; i < 40; i++) sample(7);
    check(favg == 9'd7, "constant 7 gives 7");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
