// tb_sann_robot_top_full: the robot-car controller at its default parameters
// (200 MHz clock, one time step every 200,000 cycles = 1 ms, 2^14-deep moving
// mean, 500 Hz PWM with 256 levels).
//
// Runs 15 time steps (3 million cycles, 7.5 PWM periods). Every synapse of
// neuron 0 receives an input spike in every step, so that neuron fires in the
// first step and then at most every third step (two refractory steps in
// between); neuron 1 gets no input and stays silent. Checks: the step period of 200,000 cycles
// and a step latency within 2,500 cycles, the firing pattern, 2-AG rising by 1.0
// per spike and DSE = -1.75 * 2-AG, PR of neuron 0 below 0.5 once DSE acts, PWM
// periods of 256 * 1562 cycles, and both PWM outputs low while the moving mean
// is still filling (f' = 0, duty 0).
module tb_sann_robot_top_full;
  import sann_pkg::*;
  localparam int NNEU = 2, NSYN = 10, STEPS = 15;

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

  sann_robot_top dut (.*);

  always #2.5 clk = ~clk;   // 200 MHz

  // drive a falling reset edge so the asynchronous reset really fires
  initial #1 rst_n = 1'b0;

  int checks = 0, failures = 0;

  initial begin : watchdog
    repeat ((STEPS + 2) * 200_000) @(posedge clk);
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

  longint cyc, last_done, last_tick, last_ps [NNEU];
  int     step, nspk, nps, pwm_hi, last_spk;

  always @(posedge clk) if (dut.step_tick) last_tick = cyc + 1;

  always @(posedge clk) begin
    cyc++;
    if (pwm != '0) pwm_hi++;
    for (int n = 0; n < NNEU; n++)
      if (pwm_period_start[n]) begin
        if (last_ps[n] != 0) begin
          check(cyc - last_ps[n] == 256 * 1562, $sformatf("PWM period %0d", cyc - last_ps[n]));
          nps++;
        end
        last_ps[n] = cyc;
      end
  end

  always @(posedge clk) if (rst_n && step_done) begin
    step++;
    if (last_done != 0) check(cyc - last_done == 200_000, $sformatf("step period %0d", cyc - last_done));
    check(cyc - last_tick <= 2500, $sformatf("step latency %0d cycles", cyc - last_tick));
    last_done = cyc;
    // neuron 0: fires in step 1, never in the 2 refractory steps after a spike
    if (step == 1) check(probe_spike[0], "fires in the first step");
    if (probe_spike[0]) begin
      check(step - last_spk >= 3 || last_spk == 0, $sformatf("spike %0d steps after the last", step - last_spk));
      last_spk = step;
    end
    check(!probe_spike[1], "neuron 1 silent");
    if (probe_spike[0]) nspk++;
    check(probe_ag[0] > fx_t'((longint'(nspk) << 24) - (longint'(nspk) << 20)) && probe_ag[0] <= fx_t'(longint'(nspk) << 24),
          $sformatf("2-AG after %0d spikes: %f", nspk, real'(probe_ag[0]) / 16777216.0));
    check(probe_dse[0] == fx_t'((longint'(-29360128) * longint'(probe_ag[0])) >>> 24), "DSE = -1.75 * 2-AG");
    if (step >= 2) check(probe_pr[0][3] < 17'd32768 && probe_pr[1][3] == 17'd32768, "DSE lowers PR of neuron 0 only");
    check(probe_favg[0] == 0 && probe_duty[0] == 0 && probe_fmmm_full == '0, "moving mean still filling");
    if (step == STEPS) begin
      check(nspk >= 3 && nspk <= 5, $sformatf("%0d spikes in %0d steps", nspk, STEPS));
      check(nps >= 12, $sformatf("%0d PWM periods measured", nps));
      check(pwm_hi == 0, "PWM low at duty 0");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  initial begin
    for (int n = 0; n < NNEU; n++) begin
      in_spikes[n] = (n == 0) ? '1 : '0;
      fault_ena[n] = '0;
      last_ps[n] = 0;
      for (int s = 0; s < NSYN; s++) seeds[n][s] = 32'hACE1 + 31 * n + s;
    end
    cyc = 0; last_done = 0; last_tick = 0; last_spk = 0; step = 0; nspk = 0; nps = 0; pwm_hi = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
  end
endmodule
