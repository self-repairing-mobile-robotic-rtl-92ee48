// sann_pkg: types and helpers shared by the spiking astrocyte-neuron network (SANN)
// and its robot-car motor path.
//
// All analogue state of the network (membrane potential, 2-AG, DSE, IP3, Ca2+,
// glutamate, e-SP) is kept in one signed fixed-point format, fx_t: 40 bits with
// 24 fraction bits, i.e. a range of +/-32768 with a resolution of about 6e-8.
// That covers DSE and e-SP in percent (a few hundred) and the small astrocyte
// concentrations without rescaling between blocks. The format is a choice of
// this design; the source model is written in real numbers.
//
// Release probabilities and random numbers use unsigned Q0.16: a random number
// is 16 bits in [0,1), a probability is 17 bits so that 1.0 (65536) fits.
package sann_pkg;

  localparam int FX_W = 40;
  localparam int FX_F = 24;
  typedef logic signed [FX_W-1:0] fx_t;

  localparam int PR_F = 16;
  typedef logic [PR_F:0]   pr_t;   // 0 .. 65536 (= 1.0)
  typedef logic [PR_F-1:0] rnd_t;  // 0 .. 65535 (< 1.0)
  localparam pr_t PR_ONE = pr_t'(1 << PR_F);

  // Real constant to fx_t, rounded to nearest (elaboration time only).
  function automatic fx_t fx_from_real(real r);
    return fx_t'(longint'(r * (2.0 ** FX_F)));
  endfunction

  // Real probability to Q0.16, rounded to nearest (elaboration time only).
  function automatic pr_t pr_from_real(real r);
    return pr_t'(longint'(r * (2.0 ** PR_F)));
  endfunction

  // Fixed-point product, truncated toward minus infinity.
  function automatic fx_t fx_mul(fx_t a, fx_t b);
    logic signed [2*FX_W-1:0] p;
    p = a * b;
    return fx_t'(p >>> FX_F);
  endfunction

  // Clamp a fixed-point probability (1.0 = 2^FX_F) to [0,1] and convert to Q0.16.
  function automatic pr_t fx_to_pr(fx_t x);
    if (x <= 0) return '0;
    if (x >= (fx_t'(1) <<< FX_F)) return PR_ONE;
    return pr_t'(x >>> (FX_F - PR_F));
  endfunction

endpackage
