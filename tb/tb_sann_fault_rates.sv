// tb_sann_fault_rates: the four straight-line experiments side by side.
//
// Four copies of the controller run 600 s of network time (1 ms steps
// compressed to 8 clock cycles, PWM prescaler 1, all other parameters at their
// defaults) with the same ~10 Hz input trains. At 200 s, 0, 2, 4 and 8 of the
// ten synapses of neuron 1 (right wheel) are made faulty (PR = 0.1): fault
// rates of 0 %, 20 %, 40 % and 80 %.
// Expected behaviour, checked over 230-600 s:
//   - up to 40 %: the right wheel's f' stays within 1 Hz of the left wheel's
//     for at least 90 % of the time and ends at 6-8 Hz
//   - 80 %: the right wheel's mean f' is clearly lower than the left wheel's
//     and its duty is 20 % for most of the time
//   - the mean PR of a healthy synapse of neuron 1 rises with the fault rate
//   - the faulty synapses read PR = 0.1
module tb_sann_fault_rates;
  import sann_pkg::*;
  localparam int NNEU = 2, NSYN = 10, SC = 8, NEXP = 4;
  localparam int T_FAULT = 200_000, T_OBS = 230_000, T_END = 600_000;
  localparam int NFAULT [NEXP] = '{0, 2, 4, 8};

  logic clk = 1'b0, rst_n = 1'b1;
  logic [NSYN-1:0] in_spikes [NNEU];
  logic [31:0]     seeds [NNEU][NSYN];
  logic [NSYN-1:0] fault_ena [NEXP][NNEU];
  logic [NEXP-1:0] step_done;
  pr_t             probe_pr [NEXP][NNEU][NSYN];
  logic [8:0]      probe_favg [NEXP][NNEU];
  logic [7:0]      probe_duty [NEXP][NNEU];

  for (genvar e = 0; e < NEXP; e++) begin : g_exp
    logic [NNEU-1:0] pwm, spk, ffull, fdone, pps;
    logic            carel;
    fx_t             vol [NNEU], ag [NNEU], dse [NNEU];
    fx_t             esp, ca, ip3, glu;
    logic [8:0]      freq [NNEU];
    sann_robot_top #(.STEP_CYCLES(SC), .CLK_HZ(500 * 256)) dut (
      .clk, .rst_n, .in_spikes, .fault_ena(fault_ena[e]), .seeds, .pwm, .step_done(step_done[e]),
      .probe_pr(probe_pr[e]), .probe_vol(vol), .probe_spike(spk), .probe_ag(ag), .probe_dse(dse),
      .probe_esp(esp), .probe_ca(ca), .probe_ca_release(carel), .probe_freq(freq),
      .probe_favg(probe_favg[e]), .probe_duty(probe_duty[e]), .probe_ip3(ip3), .probe_glu(glu),
      .probe_fmmm_full(ffull), .probe_fmmm_done(fdone), .pwm_period_start(pps));
  end

  always #5 clk = ~clk;

  // drive a falling reset edge so the asynchronous reset really fires
  initial #1 rst_n = 1'b0;

  int checks = 0, failures = 0;

  initial begin : watchdog
    repeat ((T_END + 2000) * SC) @(posedge clk);
    failures++;
    $display("watchdog expired");
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

  int  step, nobs;
  int  close_cnt [NEXP], d20_cnt [NEXP];
  real fa_sum [NEXP][NNEU], pr_sum [NEXP];

  always @(posedge clk) if (rst_n && step_done[0]) begin
    step++;
    for (int n = 0; n < NNEU; n++)
      for (int s = 0; s < NSYN; s++) in_spikes[n][s] <= ($urandom_range(999) < 10);
    if (step == T_FAULT)
      for (int e = 0; e < NEXP; e++)
        for (int s = 0; s < NSYN; s++) fault_ena[e][1][s] <= (s < NFAULT[e]);
    if (step > T_OBS) begin
      nobs++;
      for (int e = 0; e < NEXP; e++) begin
        int d;
        d = int'(probe_favg[e][1]) - int'(probe_favg[e][0]);
        if (d >= -1 && d <= 1) close_cnt[e]++;
        if (probe_duty[e][1] == 8'd51) d20_cnt[e]++;
        fa_sum[e][0] += probe_favg[e][0];
        fa_sum[e][1] += probe_favg[e][1];
        pr_sum[e] += probe_pr[e][1][9] / 65536.0;
        if (NFAULT[e] > 0 && step % 10000 == 0) check(probe_pr[e][1][0] == 17'd6554, "faulty PR = 0.1");
      end
    end
    if (step % 100_000 == 0)
      for (int e = 0; e < NEXP; e++)
        $display("t=%0d s, %0d%% faults: f'=%0d/%0d duty=%0d/%0d PR(syn 10)=%.3f/%.3f", step / 1000, NFAULT[e] * 10,
                 probe_favg[e][0], probe_favg[e][1], probe_duty[e][0], probe_duty[e][1],
                 probe_pr[e][0][9] / 65536.0, probe_pr[e][1][9] / 65536.0);
    if (step == T_END) begin
      for (int e = 0; e < NEXP; e++) begin
        $display("%0d%% faults: mean f' %.2f/%.2f, f' within 1 Hz %.1f%% of the time, right duty 20%% %.1f%%, mean healthy PR %.3f",
                 NFAULT[e] * 10, fa_sum[e][0] / nobs, fa_sum[e][1] / nobs, 100.0 * close_cnt[e] / nobs,
                 100.0 * d20_cnt[e] / nobs, pr_sum[e] / nobs);
        if (NFAULT[e] <= 4) begin
          check(close_cnt[e] > nobs * 9 / 10, $sformatf("%0d%%: wheels matched", NFAULT[e] * 10));
          check(probe_favg[e][1] >= 6 && probe_favg[e][1] <= 8, $sformatf("%0d%%: right f' near 7 Hz", NFAULT[e] * 10));
        end else begin
          check(fa_sum[e][1] / nobs < fa_sum[e][0] / nobs - 1.0, "80%: right wheel slower");
          check(d20_cnt[e] > nobs / 2, "80%: right duty mostly 20 %");
        end
        if (e > 0) check(pr_sum[e] > pr_sum[e - 1], $sformatf("healthy PR rises from %0d%% to %0d%%", NFAULT[e - 1] * 10, NFAULT[e] * 10));
      end
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  initial begin
    for (int n = 0; n < NNEU; n++) begin
      in_spikes[n] = '0;
      for (int s = 0; s < NSYN; s++) seeds[n][s] = 32'h1234 + 100 * n + 7 * s;
      for (int e = 0; e < NEXP; e++) fault_ena[e][n] = '0;
    end
    for (int e = 0; e < NEXP; e++) begin
      close_cnt[e] = 0; d20_cnt[e] = 0; pr_sum[e] = 0.0;
      fa_sum[e][0] = 0.0; fa_sum[e][1] = 0.0;
    end
    step = 0; nobs = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
  end
endmodule
