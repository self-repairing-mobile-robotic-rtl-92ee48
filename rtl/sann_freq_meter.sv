// sann_freq_meter: output spike frequency of one neuron.
//
// Counts the neuron's spikes over a window of WIN_STEPS time steps (1000 steps =
// 1 s with a 1 ms step) and, at the end of each window, presents the count as the
// neuron frequency in Hz. The value holds until the next window ends, so the
// moving-mean module downstream can take one sample per time step.
//
// Timing: spike is sampled on each en pulse; freq updates at the en edge that
// closes a window and saturates at 2^FREQ_W-1. How the frequency is measured is
// not given by the source; the counting window is this design's choice.
module sann_freq_meter #(
  parameter int WIN_STEPS = 1000,
  parameter int FREQ_W    = 9
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              en,
  input  logic              spike,
  output logic [FREQ_W-1:0] freq
);

  localparam int WC_W = $clog2(WIN_STEPS);
  localparam logic [FREQ_W-1:0] FMAX = '1;

  logic [WC_W-1:0]   step_cnt;
  logic [FREQ_W-1:0] spk_cnt, spk_cnt_inc;

  assign spk_cnt_inc = (spike && spk_cnt != FMAX) ? spk_cnt + 1'b1 : spk_cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      step_cnt <= '0;
      spk_cnt  <= '0;
      freq     <= '0;
    end else if (en) begin
      if (step_cnt == WC_W'(WIN_STEPS - 1)) begin
        step_cnt <= '0;
        freq     <= spk_cnt_inc;
        spk_cnt  <= '0;
      end else begin
        step_cnt <= step_cnt + 1'b1;
        spk_cnt  <= spk_cnt_inc;
      end
    end
  end

endmodule
