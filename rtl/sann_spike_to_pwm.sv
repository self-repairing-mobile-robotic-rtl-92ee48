// sann_spike_to_pwm: maps the average spike frequency f' to a PWM duty value.
//
// D = F(f') with F a piecewise (staircase) function on the 8-bit duty scale
// (256 = 100 %). f' above F_MAX (10 Hz) is first clamped to F_MAX. Then
//     f' <  F_LO (5 Hz)        -> 0
//     F_LO <= f' < F_HI (7 Hz) -> D_LO (51, 20 %)
//     f' >= F_HI               -> D_HI (102, 40 %)
// The source states only that F is piecewise with f'max = 10 Hz and resolution
// 256; the breakpoints and levels are read from its reported operating points
// (~7 Hz gives 40 %, ~5-6 Hz gives 20 %, 0 Hz gives 0 %).
// Timing: duty is registered, one cycle after favg.
module sann_spike_to_pwm #(
  parameter int         FREQ_W = 9,
  parameter int         F_MAX  = 10,
  parameter int         F_LO   = 5,
  parameter int         F_HI   = 7,
  parameter logic [7:0] D_LO   = 8'd51,
  parameter logic [7:0] D_HI   = 8'd102
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [FREQ_W-1:0] favg,
  output logic [7:0]        duty
);

  logic [FREQ_W-1:0] f_clamped;
  logic [7:0]        d;

  always_comb begin
    f_clamped = (favg > FREQ_W'(F_MAX)) ? FREQ_W'(F_MAX) : favg;
    if (f_clamped >= FREQ_W'(F_HI))      d = D_HI;
    else if (f_clamped >= FREQ_W'(F_LO)) d = D_LO;
    else                                 d = '0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) duty <= '0;
    else        duty <= d;
  end

endmodule
