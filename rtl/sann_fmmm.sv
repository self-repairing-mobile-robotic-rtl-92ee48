// sann_fmmm: frequency moving mean module (FMMM).
//
// Smooths the fluctuating neuron frequency with a moving mean over the last
// n = 2^K samples:  f' = (1/n) * sum_{i=0}^{n-1} f_{m-i}.
// The samples sit in a 2^K-deep FIFO. A running sum f_sum gains each entering
// sample and, once the FIFO is full, loses the sample that leaves it; the mean is
// f_sum shifted right by K bits, so no divider is needed.
//
// The FIFO is a circular buffer in a RAM: because the FIFO is always full in
// steady state, the entry being overwritten is exactly the one leaving it.
// Timing: a sample_valid pulse reads the leaving entry (cycle 1); in cycle 2 the
// RAM is written, f_sum and favg are updated and done pulses. Samples must be at
// least 2 cycles apart. favg stays 0 until the FIFO has filled once (full = 1).
// Structure and the 2^14 depth follow the source; the fill behaviour, sample
// width and two-cycle timing are this design's.
module sann_fmmm #(
  parameter int K      = 14,
  parameter int FREQ_W = 9
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              sample_valid,
  input  logic [FREQ_W-1:0] freq,
  output logic [FREQ_W-1:0] favg,
  output logic              full,
  output logic              done
);

  localparam int DEPTH = 1 << K;
  localparam int SUM_W = FREQ_W + K;

  logic [FREQ_W-1:0] mem [DEPTH];
  logic [K-1:0]      wp;
  logic [FREQ_W-1:0] new_q, old_q;
  logic              stage2;
  logic [SUM_W-1:0]  fsum, fsum_next;

  // Read the leaving entry before it is overwritten.
  always_ff @(posedge clk) begin
    if (sample_valid) begin
      old_q <= mem[wp];
      new_q <= freq;
    end
    if (stage2) mem[wp] <= new_q;
  end

  assign fsum_next = fsum + SUM_W'(new_q) - (full ? SUM_W'(old_q) : '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      stage2 <= 1'b0;
      wp     <= '0;
      full   <= 1'b0;
      fsum   <= '0;
      favg   <= '0;
      done   <= 1'b0;
    end else begin
      stage2 <= sample_valid;
      done   <= stage2;
      if (stage2) begin
        fsum <= fsum_next;
        wp   <= wp + 1'b1;
        if (wp == K'(DEPTH - 1)) full <= 1'b1;
        if (full || wp == K'(DEPTH - 1)) favg <= FREQ_W'(fsum_next >> K);
      end
    end
  end

  // A new sample may not arrive while the previous one is being written.
  assert property (@(posedge clk) stage2 |-> !sample_valid)
    else $error("sann_fmmm: samples closer than 2 cycles");

endmodule
