// sann_lif_neuron: leaky integrate-and-fire neuron of the neuron facility.
//
// Implements tau_m dv/dt = -v + R_m * sum_i I_syn^i with one forward-Euler step
// per time step (en pulse):
//     v <= v + (R_m * sum(syn_in) - v) / 2^TAU_M_SHIFT
// tau_m is a power of two of time steps so the division is an arithmetic shift.
// When v reaches the firing threshold V_TH (9 mV) the neuron emits a spike for
// that step, v is reset to 0 and the neuron ignores its input for REFRAC_STEPS
// steps (2 ms with the 1 ms step used here).
//
// Interface: syn_in holds the NSYN synapse currents (neuVarSynIn); spike
// (neuVarSpikes) and vmem (probeNeuVarVol, in mV) are registered at the en edge.
// Threshold and refractory time follow the source; tau_m, R_m, the reset value
// and the step length are this design's.
module sann_lif_neuron
  import sann_pkg::*;
#(
  parameter int  NSYN         = 10,
  parameter int  TAU_M_SHIFT  = 7,
  parameter fx_t R_M          = fx_from_real(512.0),
  parameter fx_t V_TH         = fx_from_real(9.0),
  parameter int  REFRAC_STEPS = 2
) (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  input  fx_t  syn_in [NSYN],
  output logic spike,
  output fx_t  vmem
);

  localparam int RC_W = $clog2(REFRAC_STEPS + 1);

  fx_t             i_sum, v_next;
  logic [RC_W-1:0] refrac;

  always_comb begin
    i_sum = '0;
    for (int i = 0; i < NSYN; i++) i_sum += syn_in[i];
    v_next = vmem + ((fx_mul(R_M, i_sum) - vmem) >>> TAU_M_SHIFT);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vmem   <= '0;
      spike  <= 1'b0;
      refrac <= '0;
    end else if (en) begin
      spike <= 1'b0;
      if (refrac != '0) begin
        refrac <= refrac - 1'b1;
        vmem   <= '0;
      end else if (v_next >= V_TH) begin
        spike  <= 1'b1;
        vmem   <= '0;
        refrac <= RC_W'(REFRAC_STEPS);
      end else begin
        vmem <= v_next;
      end
    end
  end

endmodule
