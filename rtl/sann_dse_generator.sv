// sann_dse_generator: 2-AG release and DSE signal of one neuron.
//
// When the neuron fires, 2-AG is released and then decays:
//     d(AG)/dt = -AG/tau_AG + r_AG * delta(t - t_sp)
// realised per time step (en pulse) as AG <= AG - AG/2^TAU_AG_SHIFT (+ R_AG if the
// neuron spiked in this step). The DSE is linear in 2-AG, DSE = K_AG * AG, with
// K_AG negative, so DSE is a percentage that lowers the release probability of
// the neuron's own synapses. 2-AG also goes to the astrocyte.
//
// Timing: ag is registered at the en edge; dse is a combinational product of ag.
// The equations follow the source; tau_AG, r_AG and K_AG are this design's.
module sann_dse_generator
  import sann_pkg::*;
#(
  parameter int  TAU_AG_SHIFT = 14,
  parameter fx_t R_AG         = fx_from_real(1.0),
  parameter fx_t K_AG         = fx_from_real(-1.75)
) (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  input  logic spike,
  output fx_t  ag,
  output fx_t  dse
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ag <= '0;
    else if (en) ag <= ag - (ag >>> TAU_AG_SHIFT) + (spike ? R_AG : fx_t'(0));
  end

  assign dse = fx_mul(K_AG, ag);

endmodule
