// tb_sann_rng: self-checking testbench of the synapse random number generator.
// Compares 2000 draws with an xorshift reference written here, checks that en=0
// holds the value, that a zero seed is replaced, and that the draws are roughly
// uniform (mean and the share below 0.25).
module tb_sann_rng;
  logic        clk = 1'b0, rst_n = 1'b1, en = 1'b0;
  logic [31:0] seed;
  logic [15:0] rnd;
  int checks = 0, failures = 0;

  sann_rng dut (.clk, .rst_n, .seed, .en, .rnd);

  always #5 clk = ~clk;

  // drive a falling reset edge so the asynchronous reset really fires
  initial #1 rst_n = 1'b0;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] xs(logic [31:0] x);
    x = x ^ (x << 13);
    x = x ^ (x >> 17);
    x = x ^ (x << 5);
    return x;
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  logic [31:0] ref_s;
  real sum;
  int  low;

  initial begin
    seed = 32'hDEAD_BEEF;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    ref_s = 32'hDEAD_BEEF;
    @(negedge clk);
    check(rnd == ref_s[31:16], "value after seeding");
    sum = 0.0; low = 0;
    for (int i = 0; i < 2000; i++) begin
      en = 1'b1;
      @(negedge clk);
      ref_s = xs(ref_s);
      check(rnd == ref_s[31:16], $sformatf("draw %0d: got %h want %h", i, rnd, ref_s[31:16]));
      sum += real'(rnd) / 65536.0;
      if (rnd < 16'h4000) low++;
    end
    en = 1'b0;
    repeat (3) @(negedge clk);
    check(rnd == ref_s[31:16], "en=0 holds the state");
    check(sum / 2000.0 > 0.47 && sum / 2000.0 < 0.53, $sformatf("mean %f", sum / 2000.0));
    check(low > 440 && low < 560, $sformatf("share below 0.25: %0d/2000", low));
    // zero seed
    seed = '0;
    rst_n = 1'b0;
    @(negedge clk);
    rst_n = 1'b1;
    check(rnd == 16'h2545, "zero seed replaced by the fixed constant");
    en = 1'b1;
    @(negedge clk);
    check(rnd == xs(32'h2545_F491) >> 16, "first draw after zero seed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
