// tb_sann_lif_neuron: self-checking testbench of the leaky integrate-and-fire
// neuron. A reference model written here with wide integer arithmetic follows
// tau_m dv/dt = -v + R_m*sum(I) step by step, fires at 9 mV and holds the
// neuron for 2 refractory steps. Random synapse currents are applied for 3000
// steps and spike and membrane voltage are compared every step. Directed cases
// check a single large input fires at once, the refractory period, and that the
// potential leaks away without input.
module tb_sann_lif_neuron;
  import sann_pkg::*;
  localparam int NSYN = 10;
  logic clk = 1'b0, rst_n = 1'b1, en = 1'b0, spike;
  fx_t  syn_in [NSYN];
  fx_t  vmem;
  int checks = 0, failures = 0;

  sann_lif_neuron #(.NSYN(NSYN)) dut (.clk, .rst_n, .en, .syn_in, .spike, .vmem);

  always #5 clk = ~clk;

  // drive a falling reset edge so the asynchronous reset really fires
  initial #1 rst_n = 1'b0;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  localparam longint ONE = 64'sd1 << 24;
  longint rv;     // reference potential (fx units)
  int     rref;   // reference refractory count
  bit     rspk;
  int     nspk, nref;

  task automatic step(int nact);
    longint isum, vn;
    isum = 0;
    for (int i = 0; i < NSYN; i++) begin
      syn_in[i] = (i < nact) ? fx_t'(ONE) : '0;
      isum += (i < nact) ? ONE : 0;
    end
    // reference
    vn = rv + ((((512 * ONE) * isum) >>> 24) - rv >>> 7);
    rspk = 1'b0;
    if (rref != 0) begin
      rref--;
      rv = 0;
    end else if (vn >= 9 * ONE) begin
      rspk = 1'b1;
      rv = 0;
      rref = 2;
    end else rv = vn;
    en = 1'b1;
    @(negedge clk);
    en = 1'b0;
    check(spike == rspk, $sformatf("spike got %0b want %0b", spike, rspk));
    check(longint'(vmem) == rv, $sformatf("vmem got %0d want %0d", vmem, rv));
    if (spike) nspk++;
  endtask

  initial begin
    foreach (syn_in[i]) syn_in[i] = '0;
    rv = 0; rref = 0; nspk = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    // random activity: each synapse active with probability ~2.5 % per step
    for (int s = 0; s < 3000; s++) begin
      int n;
      n = 0;
      for (int i = 0; i < NSYN; i++) if ($urandom_range(39) == 0) n++;
      step(n);
    end
    check(nspk > 5, $sformatf("neuron fired %0d times under random input", nspk));
    // three inputs at once: 3*512/128 = 12 mV > 9 mV -> fires in that step
    for (int i = 0; i < 10; i++) step(0);
    step(3);
    check(spike, "fires on a 12 mV jump");
    // refractory: strong input in the next 2 steps does not fire
    step(10);
    check(!spike && vmem == 0, "refractory step 1");
    step(10);
    check(!spike && vmem == 0, "refractory step 2");
    step(10);
    check(spike, "fires again after the refractory period");
    // two inputs (8 mV) stay below threshold and then leak
    for (int i = 0; i < 3; i++) step(0);
    step(2);
    check(!spike && vmem > fx_t'(7 * ONE), "8 mV stays below threshold");
    for (int i = 0; i < 1000; i++) step(0);
    check(vmem < fx_t'(ONE / 10), "potential leaks away");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
