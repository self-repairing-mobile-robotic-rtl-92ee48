// sann_astrocyte: astrocyte facility of the astrocyte-neuron network.
//
// The astrocyte turns the 2-AG released by all its neurons into the global e-SP
// signal that raises the release probability of every synapse it enwraps. One
// forward-Euler step is taken per time step (en pulse), all from the previous
// step's values:
//   IP3 : d(IP3)/dt = (IP3* - IP3)/tau_ip3 + r_ip3 * AG
//         IP3 <= IP3 + (IP3_BASE + R_IP3_TAU*AG_sum - IP3) / 2^TAU_IP3_SHIFT
//         (R_IP3_TAU = r_ip3 * tau_ip3; AG_sum is the 2-AG of all neurons)
//   Ca  : d(Ca)/dt = J_chan + J_leak - J_pump
//         J_chan = K_CHAN * IP3 * h   (IP3-gated release, inactivated by h)
//         J_leak = J_LEAK             (constant leak out of the store)
//         J_pump = Ca / 2^PUMP_SHIFT  (pump back into the store)
//         h relaxes (time constant 2^H_SHIFT steps) to 0 once Ca has passed
//         CA_HI and back to 1 once Ca has fallen below CA_LO, so calcium
//         oscillates, faster for more IP3.
//   Glu : d(Glu)/dt = -Glu/tau_Glu + r_Glu * delta(t - t_ca)
//         t_ca is a step in which Ca rises through CA_TH.
//   eSP : tau_eSP d(eSP)/dt = -eSP + m_eSP * Glu
//         eSP <= eSP + (M_ESP*Glu - eSP) / 2^TAU_ESP_SHIFT  (in percent)
//
// Equations for IP3, Glu and e-SP follow the source. The source names the three
// calcium fluxes but does not give their forms; the forms above are the simplest
// that give IP3-dependent calcium oscillations and are this design's, as are all
// rates and time constants (picked so e-SP settles near +190 % within ~100 s).
// Timing: all outputs are registers updated at the en edge.
module sann_astrocyte
  import sann_pkg::*;
#(
  parameter int  NNEU          = 2,
  parameter int  TAU_IP3_SHIFT = 10,
  parameter fx_t IP3_BASE      = fx_from_real(0.16),
  parameter fx_t R_IP3_TAU     = fx_from_real(0.0037),
  parameter fx_t K_CHAN        = fx_from_real(0.002),
  parameter fx_t J_LEAK        = fx_from_real(0.0001),
  parameter int  PUMP_SHIFT    = 9,
  parameter int  H_SHIFT       = 6,
  parameter fx_t CA_HI         = fx_from_real(0.5),
  parameter fx_t CA_LO         = fx_from_real(0.15),
  parameter fx_t CA_TH         = fx_from_real(0.3),
  parameter int  TAU_GLU_SHIFT = 7,
  parameter fx_t R_GLU         = fx_from_real(1.0),
  parameter int  TAU_ESP_SHIFT = 15,
  parameter fx_t M_ESP         = fx_from_real(1750.0)
) (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  input  fx_t  ag [NNEU],
  output fx_t  esp,
  output fx_t  ip3,
  output fx_t  ca,
  output fx_t  glu,
  output logic ca_release      // pulse: Ca crossed CA_TH upward in the last step
);

  localparam fx_t FX_ONE = fx_t'(1) <<< FX_F;

  fx_t  ag_sum, ip3_next, j_chan, ca_next, h, h_next, glu_next, esp_next;
  logic inact;        // inactivation latched: Ca passed CA_HI, not yet below CA_LO
  logic inact_next, ca_cross;

  always_comb begin
    ag_sum = '0;
    for (int i = 0; i < NNEU; i++) ag_sum += ag[i];

    ip3_next = ip3 + ((IP3_BASE + fx_mul(R_IP3_TAU, ag_sum) - ip3) >>> TAU_IP3_SHIFT);

    j_chan  = fx_mul(K_CHAN, fx_mul(ip3, h));
    ca_next = ca + j_chan + J_LEAK - (ca >>> PUMP_SHIFT);
    if (ca_next < 0) ca_next = '0;

    if (ca >= CA_HI)     inact_next = 1'b1;
    else if (ca < CA_LO) inact_next = 1'b0;
    else                 inact_next = inact;
    h_next = h + (((inact ? fx_t'(0) : FX_ONE) - h) >>> H_SHIFT);

    ca_cross    = (ca < CA_TH) && (ca_next >= CA_TH);
    glu_next = glu - (glu >>> TAU_GLU_SHIFT) + (ca_cross ? R_GLU : fx_t'(0));
    esp_next = esp + ((fx_mul(M_ESP, glu) - esp) >>> TAU_ESP_SHIFT);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ip3        <= IP3_BASE;
      ca         <= '0;
      h          <= FX_ONE;
      inact      <= 1'b0;
      glu        <= '0;
      esp        <= '0;
      ca_release <= 1'b0;
    end else if (en) begin
      ip3        <= ip3_next;
      ca         <= ca_next;
      h          <= h_next;
      inact      <= inact_next;
      glu        <= glu_next;
      esp        <= esp_next;
      ca_release <= ca_cross;
    end
  end

endmodule
