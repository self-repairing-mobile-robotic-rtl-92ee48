// sann_pwm_controller: PWM generator driving one wheel motor (enable input of an
// H-bridge driver).
//
// An 8-bit counter (resolution 256) advances once every PRESCALE clock cycles,
// so one PWM period is 256 * PRESCALE cycles: 200 MHz / (256 * 1562) = 500.16 Hz
// for the 500 Hz of the source. The output is high while the counter is below
// the duty value, so duty/256 is the high fraction. The duty value is taken at the
// start of each period, which keeps a period from being cut short.
// Timing: period_start pulses in the last cycle of each period, the cycle in
// which the next duty value is taken; pwm is registered. Frequency and resolution follow the source; the counter structure
// is this design's.
module sann_pwm_controller #(
  parameter int CLK_HZ   = 200_000_000,
  parameter int PWM_HZ   = 500,
  parameter int RES_BITS = 8,
  parameter int PRESCALE = CLK_HZ / (PWM_HZ * (1 << RES_BITS))
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [RES_BITS-1:0] duty,
  output logic                pwm,
  output logic                period_start
);

  localparam int PS_W = (PRESCALE > 1) ? $clog2(PRESCALE) : 1;

  logic [PS_W-1:0]     ps_cnt;
  logic [RES_BITS-1:0] cnt, duty_q;
  logic                tick;

  assign tick = (ps_cnt == PS_W'(PRESCALE - 1));
  assign period_start = tick && (cnt == '1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ps_cnt <= '0;
      cnt    <= '0;
      duty_q <= '0;
      pwm    <= 1'b0;
    end else begin
      ps_cnt <= tick ? '0 : ps_cnt + 1'b1;
      if (tick) begin
        cnt <= cnt + 1'b1;
        if (cnt == '1) duty_q <= duty;
      end
      pwm <= (cnt < duty_q);
    end
  end

endmodule
