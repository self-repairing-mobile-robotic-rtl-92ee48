// sann_synapse: probabilistic synapse facility of the astrocyte-neuron network.
//
// The synapse transmits a pre-synaptic spike with the release probability PR.
// PR starts from PR0 = 0.5 and is moved by two PR adjustors: the DSE adjustor
// (retrograde signal of the synapse's own neuron, negative, in percent) lowers
// it and the e-SP adjustor (global signal from the astrocyte, positive, in
// percent) raises it:
//     PR = PR0 + PR0/100 * DSE + PR0/100 * eSP,   clamped to [0, 1].
// When fault_ena (synVarFaultEna) is high the synapse is treated as damaged and
// PR is fixed at PR_FAULT = 0.1, with no modulation.
//
// In every time step (en pulse) the synapse draws a uniform random number; if an
// input spike is present and rand <= PR it drives the fixed current I_INJ on
// syn_out (synVarOut) for that step, otherwise 0.
//
// Timing: PR (probe_pr) follows dse/esp/fault_ena combinationally; syn_out is
// registered at the en edge and holds until the next en. PR0, PR_FAULT and the
// modulation law follow the source; I_INJ, the number format and the choice to
// evaluate the synapse only when a spike arrives are this design's.
module sann_synapse
  import sann_pkg::*;
#(
  parameter pr_t PR0      = pr_from_real(0.5),
  parameter pr_t PR_FAULT = pr_from_real(0.1),
  parameter fx_t I_INJ    = fx_from_real(1.0)
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [31:0] seed,
  input  logic        en,
  input  logic        input_spike,
  input  logic        fault_ena,
  input  fx_t         dse,
  input  fx_t         esp,
  output fx_t         syn_out,
  output pr_t         probe_pr
);

  // PR0/100 in fx_t: the weight of one percent of DSE or e-SP.
  localparam fx_t PR0_FX     = fx_t'(PR0) <<< (FX_F - PR_F);
  localparam fx_t PR0_PCT_FX = fx_t'(PR0_FX / 100);

  rnd_t rnd;
  fx_t  adj_dse, adj_esp, pr_fx;
  pr_t  pr;

  sann_rng u_rng (
    .clk  (clk),
    .rst_n(rst_n),
    .seed (seed),
    .en   (en),
    .rnd  (rnd)
  );

  // The two PR adjustors.
  always_comb begin
    adj_dse = fx_mul(PR0_PCT_FX, dse);
    adj_esp = fx_mul(PR0_PCT_FX, esp);
    pr_fx   = PR0_FX + adj_dse + adj_esp;
    pr      = fault_ena ? PR_FAULT : fx_to_pr(pr_fx);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) syn_out <= '0;
    else if (en) syn_out <= (input_spike && (pr_t'(rnd) < pr)) ? I_INJ : '0;
  end

  assign probe_pr = pr;

endmodule
