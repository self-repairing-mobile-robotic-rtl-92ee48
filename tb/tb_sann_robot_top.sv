// tb_sann_robot_top: end-to-end test of the self-repairing robot-car controller.
//
// Runs the straight-line task: both neurons receive ~10 Hz Poisson-like input
// trains on all ten synapses. With 1 ms steps compressed to 8 clock cycles and
// the PWM prescaler at 1 (a 256-cycle PWM period), 300 s of network time are
// simulated with the default network, FIFO depth (2^14) and window sizes.
// At 150 s four synapses of neuron 1 (the right wheel) are made faulty (40 %
// fault rate). From 60 s to 90 s one synapse of neuron 0 carries a temporary
// fault.
//
// Checked against values worked out here:
//   - step period and the step latency (<= 2,500 cycles)
//   - every f' against a moving mean of 2^14 frequency samples kept here
//   - every duty against the staircase map of f', PWM high time against duty
//   - the faulty synapses' PR is 0.1, and a temporarily faulty synapse
//     returns to the modulated PR of its neighbours once the fault is removed
// Checked against the behaviour the design must show:
//   - healthy operation settles: f' 6-8 Hz and 40 % duty on both wheels,
//     PR 0.2-0.35, DSE -260..-180 %, e-SP 150..220 %
//   - after the fault the right neuron's healthy synapses get a higher PR than
//     the left neuron's (repair) and its f' stays >= 6 Hz
// Every mechanism (input spike, transmission, neuron spike, refractory hold,
// 2-AG/DSE rise, calcium release, FIFO fill, both duty levels, PWM pulses, fault
// injection, temporary fault, repair) is counted and must occur.
module tb_sann_robot_top;
  import sann_pkg::*;
  localparam int NNEU = 2, NSYN = 10, SC = 8, K = 14, N = 1 << K;
  localparam int T_FAULT = 150_000, T_END = 300_000, T_TMP_ON = 60_000, T_TMP_OFF = 90_000;

  logic clk = 1'b0, rst_n = 1'b1;
  logic [NSYN-1:0] in_spikes [NNEU];
  logic [NSYN-1:0] fault_ena [NNEU];
  logic [31:0]     seeds [NNEU][NSYN];
  logic [NNEU-1:0] pwm, probe_spike, probe_fmmm_full, probe_fmmm_done, pwm_period_start;
  logic            step_done, probe_ca_release;
  pr_t             probe_pr [NNEU][NSYN];
  fx_t             probe_vol [NNEU], probe_ag [NNEU], probe_dse [NNEU];
  fx_t             probe_esp, probe_ca, probe_ip3, probe_glu;
  logic [8:0]      probe_freq [NNEU], probe_favg [NNEU];
  logic [7:0]      probe_duty [NNEU];

  sann_robot_top #(.STEP_CYCLES(SC), .CLK_HZ(500 * 256)) dut (.*);

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

  function automatic real r(fx_t x);
    return real'(x) / 16777216.0;
  endfunction

  // mechanism counters
  int n_in, n_tx, n_spk, n_refr, n_carel, n_full, n_d20, n_d40, n_pwm_hi, n_fault, n_repair, n_dse, n_temp;

  // neuron refractory state, read from inside the design
  logic refr [NNEU];
  assign refr[0] = (dut.g_neu[0].u_neuron.refrac != 0);
  assign refr[1] = (dut.g_neu[1].u_neuron.refrac != 0);

  // step bookkeeping
  int  step, cyc, last_tick, lat;
  bit  busy;
  int  fq [NNEU][$];
  longint fsum [NNEU];
  real pr_sum [NNEU];
  int  pr_n;

  always @(posedge clk) cyc++;

  // step timing
  always @(posedge clk) if (rst_n) begin
    if (dut.step_tick) begin
      if (last_tick != 0) check(cyc - last_tick == SC, "step period");
      last_tick = cyc;
      busy = 1'b1;
    end
    if (step_done) begin
      lat = cyc - last_tick;
      if (step % 50000 == 0) check(busy && lat <= 2500, $sformatf("step latency %0d cycles", lat));
      busy = 1'b0;
    end
  end

  // input trains and fault injection, one update per step
  always @(posedge clk) if (rst_n && dut.step_tick) begin
    for (int n = 0; n < NNEU; n++)
      for (int s = 0; s < NSYN; s++) begin
        in_spikes[n][s] <= ($urandom_range(999) < 10);
      end
    if (step == T_FAULT) begin
      for (int s = 0; s < 4; s++) fault_ena[1][s] <= 1'b1;
      n_fault++;
    end
    // temporary fault on one synapse of neuron 0 from 60 s to 90 s
    if (step == T_TMP_ON) fault_ena[0][5] <= 1'b1;
    if (step == T_TMP_OFF) fault_ena[0][5] <= 1'b0;
  end

  // per-step checks after the step is done
  always @(posedge clk) if (rst_n && step_done) begin
    step++;
    for (int n = 0; n < NNEU; n++) begin
      int want_d;
      // reference moving mean of the frequency samples taken this step
      fq[n].push_back(int'(probe_freq[n]));
      fsum[n] += probe_freq[n];
      if (fq[n].size() > N) fsum[n] -= fq[n].pop_front();
      if (step % 97 == 0 || step == T_END)
        check(probe_favg[n] == ((fq[n].size() == N) ? 9'(fsum[n] >> K) : 9'd0),
              $sformatf("f'[%0d] got %0d want %0d", n, probe_favg[n], fsum[n] >> K));
      want_d = (probe_favg[n] < 5) ? 0 : (probe_favg[n] < 7) ? 51 : 102;
      if (step % 97 == 0) check(probe_duty[n] == 8'(want_d), "duty map");
      if (probe_duty[n] == 51) n_d20++;
      if (probe_duty[n] == 102) n_d40++;
      if (probe_spike[n]) n_spk++;
      n_in += $countones(in_spikes[n]);
      if (refr[n]) n_refr++;
      if (probe_dse[n] < 0) n_dse++;
      for (int s = 0; s < NSYN; s++) if (dut.syn_out[n][s] != 0) n_tx++;
    end
    if (probe_ca_release) n_carel++;
    if (step > T_TMP_ON + 1 && step < T_TMP_OFF && step % 1000 == 0) begin
      check(probe_pr[0][5] == 17'd6554 && probe_pr[0][6] != 17'd6554, "temporary fault holds PR at 0.1");
      n_temp++;
    end
    if (step > T_TMP_OFF + 1 && step < T_TMP_OFF + 5000 && step % 1000 == 0)
      check(probe_pr[0][5] == probe_pr[0][6], "PR back to the modulated value after a temporary fault");
    if (probe_fmmm_full == 2'b11) n_full++;
    if (step == T_FAULT - 5000) begin
      $display("healthy at %0d s: f'=%0d/%0d duty=%0d/%0d PR=%.3f/%.3f DSE=%.1f/%.1f eSP=%.1f",
               step / 1000, probe_favg[0], probe_favg[1], probe_duty[0], probe_duty[1],
               probe_pr[0][9] / 65536.0, probe_pr[1][9] / 65536.0, r(probe_dse[0]), r(probe_dse[1]), r(probe_esp));
      for (int n = 0; n < NNEU; n++) begin
        check(probe_favg[n] >= 6 && probe_favg[n] <= 8, "healthy f' near 7 Hz");
        check(probe_duty[n] == 102, "healthy duty 40 %");
        check(r(probe_dse[n]) > -260.0 && r(probe_dse[n]) < -180.0, "healthy DSE near -200 %");
      end
      check(r(probe_esp) > 150.0 && r(probe_esp) < 220.0, "healthy e-SP near 190 %");
    end
    if (step > T_FAULT - 50000 && step <= T_FAULT) begin
      pr_sum[0] += probe_pr[0][9] / 65536.0;
      pr_sum[1] += probe_pr[1][9] / 65536.0;
      pr_n++;
    end
    if (step == T_FAULT) begin
      check(pr_sum[0] / pr_n > 0.2 && pr_sum[0] / pr_n < 0.35, $sformatf("healthy mean PR %.3f", pr_sum[0] / pr_n));
      pr_sum[0] = 0.0; pr_sum[1] = 0.0; pr_n = 0;
    end
    if (step > T_FAULT + 30000) begin
      pr_sum[0] += probe_pr[0][9] / 65536.0;
      pr_sum[1] += probe_pr[1][9] / 65536.0;
      pr_n++;
      if (step % 1000 == 0) check(probe_pr[1][0] == 17'd6554, "faulty PR = 0.1");
    end
    if (step == T_END) begin
      $display("40%% fault at %0d s: f'=%0d/%0d duty=%0d/%0d mean healthy PR=%.3f/%.3f DSE=%.1f/%.1f eSP=%.1f",
               step / 1000, probe_favg[0], probe_favg[1], probe_duty[0], probe_duty[1],
               pr_sum[0] / pr_n, pr_sum[1] / pr_n, r(probe_dse[0]), r(probe_dse[1]), r(probe_esp));
      if (pr_sum[1] / pr_n > pr_sum[0] / pr_n + 0.03) n_repair++;
      check(probe_favg[1] >= 6, "faulty neuron keeps f' >= 6 Hz");
      finish_run();
    end
  end

  // PWM high time against duty, for both wheels
  int hi [NNEU], dq [NNEU];
  always @(posedge clk) if (rst_n) begin
    for (int n = 0; n < NNEU; n++) begin
      if (pwm[n]) begin hi[n]++; n_pwm_hi++; end
      if (pwm_period_start[n]) begin
        if (step > 20000 && step % 50 == 0)
          check(hi[n] == dq[n], $sformatf("pwm[%0d] high %0d cycles, duty %0d", n, hi[n], dq[n]));
        hi[n] = 0;
        dq[n] = int'(probe_duty[n]);
      end
    end
  end

  task automatic finish_run();
    $display("mechanisms: input=%0d transmissions=%0d spikes=%0d refractory=%0d dse=%0d ca_release=%0d fifo_full=%0d duty20=%0d duty40=%0d pwm_high=%0d fault=%0d temporary=%0d repair=%0d",
             n_in, n_tx, n_spk, n_refr, n_dse, n_carel, n_full, n_d20, n_d40, n_pwm_hi, n_fault, n_temp, n_repair);
    check(n_in > 0, "input spikes seen");
    check(n_tx > 0, "synaptic transmissions seen");
    check(n_spk > 0, "neuron spikes seen");
    check(n_refr > 0, "refractory holds seen");
    check(n_dse > 0, "DSE seen");
    check(n_carel > 0, "calcium releases seen");
    check(n_full > 0, "FMMM FIFO filled");
    check(n_d20 > 0, "20 % duty seen");
    check(n_d40 > 0, "40 % duty seen");
    check(n_pwm_hi > 0, "PWM pulses seen");
    check(n_fault > 0, "fault injected");
    check(n_temp > 0, "temporary fault applied");
    check(n_repair > 0, "repair: healthy PR of the faulty neuron raised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin
    for (int n = 0; n < NNEU; n++) begin
      in_spikes[n] = '0;
      fault_ena[n] = '0;
      fsum[n] = 0;
      hi[n] = 0;
      dq[n] = 0;
      pr_sum[n] = 0.0;
      for (int s = 0; s < NSYN; s++) seeds[n][s] = 32'h1234 + 100 * n + 7 * s;
    end
    {n_in, n_tx, n_spk, n_refr, n_carel, n_full, n_d20, n_d40, n_pwm_hi, n_fault, n_repair, n_dse, n_temp} = '0;
    step = 0; cyc = 0; last_tick = 0; busy = 1'b0; pr_n = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
  end
endmodule
