// sann_robot_top: self-repairing robot-car controller built on a spiking
// astrocyte-neuron network (SANN).
//
// Two neurons, each fed by NSYN probabilistic synapses, share one astrocyte.
// Each neuron's own retrograde DSE signal lowers the release probability of its
// synapses, while the astrocyte, driven by the 2-AG of both neurons, returns a
// global e-SP signal that raises it. If some synapses of one neuron fail (their
// PR forced to 0.1), that neuron fires less, its DSE weakens, and its healthy
// synapses transmit more often: the network repairs its firing rate.
// Each neuron's spikes go through a frequency meter, the moving-mean module
// (FMMM), the frequency-to-duty map and a PWM controller; neuron 0 drives the
// left wheel (pwm[0]) and neuron 1 the right wheel (pwm[1]).
//
// Timing: a step timer issues one time step every STEP_CYCLES clock cycles
// (200000 = 1 ms at 200 MHz). A phase sequencer then runs the step:
//   phase 1  synapses draw and transmit (using last step's DSE and e-SP)
//   phase 2  neurons integrate and may fire
//   phase 3  2-AG/DSE and frequency meters update
//   phase 4  astrocyte updates e-SP; FMMM takes the new frequency sample
//   phase 5-6 FMMM finishes; step_done pulses after phase 6
// so a step takes 6 cycles, well within the 2,500-cycle budget of the source.
// The PWM controllers and duty maps run continuously.
//
// The signal monitor that captures the probes and packs them for a PC is not
// part of this design; the probed signals are brought out as ports.
module sann_robot_top
  import sann_pkg::*;
#(
  parameter int NNEU        = 2,
  parameter int NSYN        = 10,
  parameter int STEP_CYCLES = 200_000,
  parameter int CLK_HZ      = 200_000_000,
  parameter int PWM_HZ      = 500,
  parameter int FMMM_K      = 14,
  parameter int WIN_STEPS   = 1000,
  parameter int FREQ_W      = 9
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [NSYN-1:0]   in_spikes  [NNEU],
  input  logic [NSYN-1:0]   fault_ena  [NNEU],
  input  logic [31:0]       seeds      [NNEU][NSYN],
  output logic [NNEU-1:0]   pwm,
  output logic              step_done,
  // probes
  output pr_t               probe_pr   [NNEU][NSYN],
  output fx_t               probe_vol  [NNEU],
  output logic [NNEU-1:0]   probe_spike,
  output fx_t               probe_ag   [NNEU],
  output fx_t               probe_dse  [NNEU],
  output fx_t               probe_esp,
  output fx_t               probe_ca,
  output logic              probe_ca_release,
  output logic [FREQ_W-1:0] probe_freq [NNEU],
  output logic [FREQ_W-1:0] probe_favg [NNEU],
  output logic [7:0]        probe_duty [NNEU],
  output fx_t               probe_ip3,
  output fx_t               probe_glu,
  output logic [NNEU-1:0]   probe_fmmm_full,
  output logic [NNEU-1:0]   probe_fmmm_done,
  output logic [NNEU-1:0]   pwm_period_start
);

  localparam int NPH = 6;
  localparam int SC_W = (STEP_CYCLES > 1) ? $clog2(STEP_CYCLES) : 1;

  // ---------------- step timer and phase sequencer ----------------
  logic [SC_W-1:0]  step_cnt;
  logic [NPH:0]     ph;          // ph[0] = step start, ph[k] = phase k
  logic             step_tick;

  assign step_tick = (step_cnt == SC_W'(STEP_CYCLES - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      step_cnt <= '0;
      ph       <= '0;
    end else begin
      step_cnt <= step_tick ? '0 : step_cnt + 1'b1;
      ph       <= {ph[NPH-1:0], step_tick};
    end
  end

  assign step_done = ph[NPH];

  // ---------------- network ----------------
  fx_t syn_out [NNEU][NSYN];
  fx_t ag      [NNEU];
  fx_t dse     [NNEU];
  fx_t esp;

  for (genvar n = 0; n < NNEU; n++) begin : g_neu
    for (genvar s = 0; s < NSYN; s++) begin : g_syn
      sann_synapse u_syn (
        .clk        (clk),
        .rst_n      (rst_n),
        .seed       (seeds[n][s]),
        .en         (ph[1]),
        .input_spike(in_spikes[n][s]),
        .fault_ena  (fault_ena[n][s]),
        .dse        (dse[n]),
        .esp        (esp),
        .syn_out    (syn_out[n][s]),
        .probe_pr   (probe_pr[n][s])
      );
    end

    sann_lif_neuron #(.NSYN(NSYN)) u_neuron (
      .clk   (clk),
      .rst_n (rst_n),
      .en    (ph[2]),
      .syn_in(syn_out[n]),
      .spike (probe_spike[n]),
      .vmem  (probe_vol[n])
    );

    sann_dse_generator u_dse (
      .clk  (clk),
      .rst_n(rst_n),
      .en   (ph[3]),
      .spike(probe_spike[n]),
      .ag   (ag[n]),
      .dse  (dse[n])
    );

    sann_freq_meter #(.WIN_STEPS(WIN_STEPS), .FREQ_W(FREQ_W)) u_freq (
      .clk  (clk),
      .rst_n(rst_n),
      .en   (ph[3]),
      .spike(probe_spike[n]),
      .freq (probe_freq[n])
    );

    sann_fmmm #(.K(FMMM_K), .FREQ_W(FREQ_W)) u_fmmm (
      .clk         (clk),
      .rst_n       (rst_n),
      .sample_valid(ph[4]),
      .freq        (probe_freq[n]),
      .favg        (probe_favg[n]),
      .full        (probe_fmmm_full[n]),
      .done        (probe_fmmm_done[n])
    );

    sann_spike_to_pwm #(.FREQ_W(FREQ_W)) u_map (
      .clk  (clk),
      .rst_n(rst_n),
      .favg (probe_favg[n]),
      .duty (probe_duty[n])
    );

    sann_pwm_controller #(.CLK_HZ(CLK_HZ), .PWM_HZ(PWM_HZ)) u_pwm (
      .clk         (clk),
      .rst_n       (rst_n),
      .duty        (probe_duty[n]),
      .pwm         (pwm[n]),
      .period_start(pwm_period_start[n])
    );

    assign probe_ag[n]  = ag[n];
    assign probe_dse[n] = dse[n];
  end

  sann_astrocyte #(.NNEU(NNEU)) u_astro (
    .clk       (clk),
    .rst_n     (rst_n),
    .en        (ph[4]),
    .ag        (ag),
    .esp       (esp),
    .ip3       (probe_ip3),
    .ca        (probe_ca),
    .glu       (probe_glu),
    .ca_release(probe_ca_release)
  );

  assign probe_esp = esp;

  // A step must finish before the next one starts.
  initial assert (STEP_CYCLES > NPH) else $error("STEP_CYCLES must exceed %0d", NPH);

endmodule
