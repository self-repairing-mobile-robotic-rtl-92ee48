// tb_sann_synapse: self-checking testbench of the probabilistic synapse.
// Checks the release probability against PR = PR0*(1 + DSE/100 + eSP/100)
// computed in real arithmetic (clamped to [0,1]), the fixed PR of 0.1 under a
// fault, and every step's transmission against rand < PR using its own copy of
// the random sequence. It also checks that no current flows without an input
// spike and that the transmitted share matches PR.
module tb_sann_synapse;
  import sann_pkg::*;
  logic clk = 1'b0, rst_n = 1'b1, en = 1'b0, input_spike = 1'b0, fault_ena = 1'b0;
  logic [31:0] seed = 32'h0BAD_CAFE;
  fx_t dse = '0, esp = '0, syn_out;
  pr_t probe_pr;
  int checks = 0, failures = 0;

  sann_synapse dut (.clk, .rst_n, .seed, .en, .input_spike, .fault_ena, .dse, .esp, .syn_out, .probe_pr);

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

  function automatic logic [31:0] xs(logic [31:0] x);
    x = x ^ (x << 13);
    x = x ^ (x >> 17);
    x = x ^ (x << 5);
    return x;
  endfunction

  function automatic real fabs(real x);
    return (x < 0.0) ? -x : x;
  endfunction

  function automatic fx_t to_fx(real r);
    return fx_t'(longint'(r * 16777216.0));
  endfunction

  logic [31:0] st;
  int tx;

  // one step with the given spike; compare with the reference
  task automatic step(bit spk);
    logic [15:0] r;
    pr_t pr_now;
    r = st[31:16];
    pr_now = probe_pr;
    input_spike = spk;
    en = 1'b1;
    @(negedge clk);
    en = 1'b0;
    st = xs(st);
    check(syn_out == ((spk && ({1'b0, r} < pr_now)) ? to_fx(1.0) : fx_t'(0)),
          $sformatf("transmission: rnd=%h pr=%0d out=%0d", r, pr_now, syn_out));
    if (syn_out != 0) tx++;
  endtask

  initial begin
    real d, e, want;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    st = seed;
    @(negedge clk);
    check(probe_pr == 17'd32768, "initial PR is 0.5");
    // PR law over a sweep of DSE and e-SP
    for (int i = 0; i < 60; i++) begin
      d = -$itor($urandom_range(400));
      e = $itor($urandom_range(300));
      dse = to_fx(d);
      esp = to_fx(e);
      #1;
      want = 0.5 * (1.0 + d / 100.0 + e / 100.0);
      if (want < 0.0) want = 0.0;
      if (want > 1.0) want = 1.0;
      check(fabs(real'(probe_pr) / 65536.0 - want) < 0.0005,
            $sformatf("PR dse=%f esp=%f got %f want %f", d, e, real'(probe_pr) / 65536.0, want));
    end
    // operating point of the source: DSE -201, eSP 190
    dse = to_fx(-201.0); esp = to_fx(190.0);
    #1 check(fabs(real'(probe_pr) / 65536.0 - 0.445) < 0.0005, "PR at DSE=-201, eSP=190");
    // fault forces 0.1 regardless of modulation
    fault_ena = 1'b1;
    #1 check(probe_pr == 17'd6554, "faulty synapse PR = 0.1");
    dse = to_fx(-50.0); esp = to_fx(300.0);
    #1 check(probe_pr == 17'd6554, "faulty synapse PR not modulated");
    fault_ena = 1'b0;
    dse = '0; esp = '0;
    #1;
    @(negedge clk);
    // no input spike: never transmits
    for (int i = 0; i < 200; i++) step(1'b0);
    check(tx == 0, "no current without input spike");
    // PR = 0.5 with spikes every step
    tx = 0;
    for (int i = 0; i < 4000; i++) step(1'b1);
    check(tx > 1850 && tx < 2150, $sformatf("transmitted %0d of 4000 at PR 0.5", tx));
    // faulty: PR 0.1
    fault_ena = 1'b1;
    tx = 0;
    for (int i = 0; i < 4000; i++) step(1'b1);
    check(tx > 330 && tx < 470, $sformatf("transmitted %0d of 4000 at PR 0.1", tx));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
