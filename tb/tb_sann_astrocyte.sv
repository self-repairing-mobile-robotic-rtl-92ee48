// tb_sann_astrocyte: self-checking testbench of the astrocyte facility.
// A reference model written here with wide integer arithmetic steps IP3, Ca2+,
// the inactivation gate, glutamate and e-SP; every output is compared every step
// while the 2-AG inputs follow a slow random walk. Then, with the 2-AG of two
// neurons firing at ~7 Hz held constant, it checks that calcium oscillates
// (threshold crossings release glutamate) and that e-SP settles near +190 %
// within 150 s, and that with no 2-AG the oscillation stops and e-SP decays.
module tb_sann_astrocyte;
  import sann_pkg::*;
  localparam int NNEU = 2;
  logic clk = 1'b0, rst_n = 1'b1, en = 1'b0, ca_release;
  fx_t  ag [NNEU];
  fx_t  esp, ip3, ca, glu;
  int checks = 0, failures = 0;

  sann_astrocyte #(.NNEU(NNEU)) dut (.clk, .rst_n, .en, .ag, .esp, .ip3, .ca, .glu, .ca_release);

  always #5 clk = ~clk;

  // drive a falling reset edge so the asynchronous reset really fires
  initial #1 rst_n = 1'b0;

  initial begin : watchdog
    repeat (1000000) @(posedge clk);
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
  function automatic longint c(real r);
    return longint'(r * 16777216.0);
  endfunction
  function automatic longint mul(longint a, longint b);
    logic signed [127:0] p;
    p = 128'(a) * 128'(b);
    return longint'(p >>> 24);
  endfunction

  longint r_ip3, r_ca, r_h, r_glu, r_esp;
  bit     r_inact, r_rel;
  int     nrel;

  task automatic step(bit chk);
    longint s, ip3n, can, hn, glun, espn;
    bit inn, cr;
    s = longint'(ag[0]) + longint'(ag[1]);
    ip3n = r_ip3 + ((c(0.16) + mul(c(0.0037), s) - r_ip3) >>> 10);
    can  = r_ca + mul(c(0.002), mul(r_ip3, r_h)) + c(0.0001) - (r_ca >>> 9);
    if (can < 0) can = 0;
    inn  = (r_ca >= c(0.5)) ? 1'b1 : (r_ca < c(0.15)) ? 1'b0 : r_inact;
    hn   = r_h + (((r_inact ? 0 : ONE) - r_h) >>> 6);
    cr   = (r_ca < c(0.3)) && (can >= c(0.3));
    glun = r_glu - (r_glu >>> 7) + (cr ? ONE : 0);
    espn = r_esp + ((mul(c(1750.0), r_glu) - r_esp) >>> 15);
    r_ip3 = ip3n; r_ca = can; r_h = hn; r_inact = inn; r_glu = glun; r_esp = espn; r_rel = cr;
    en = 1'b1;
    @(negedge clk);
    en = 1'b0;
    if (ca_release) nrel++;
    if (chk) begin
      check(longint'(ip3) == r_ip3, $sformatf("ip3 got %0d want %0d", ip3, r_ip3));
      check(longint'(ca) == r_ca, $sformatf("ca got %0d want %0d", ca, r_ca));
      check(longint'(glu) == r_glu, "glu");
      check(longint'(esp) == r_esp, "esp");
      check(ca_release == r_rel, "ca_release");
    end
  endtask

  initial begin
    real e;
    ag[0] = '0; ag[1] = '0;
    r_ip3 = c(0.16); r_ca = 0; r_h = ONE; r_inact = 0; r_glu = 0; r_esp = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    // random walk of the 2-AG inputs, compared every step
    for (int i = 0; i < 20000; i++) begin
      if (i % 100 == 0) begin
        ag[0] = fx_t'(c(real'($urandom_range(200))));
        ag[1] = fx_t'(c(real'($urandom_range(200))));
      end
      step(1'b1);
    end
    // two neurons at ~7 Hz: 2-AG about 115 each
    ag[0] = fx_t'(c(115.0)); ag[1] = fx_t'(c(115.0));
    nrel = 0;
    for (int i = 0; i < 150000; i++) step(i % 500 == 0);
    e = real'(esp) / 16777216.0;
    check(nrel > 60, $sformatf("calcium releases in 150 s: %0d", nrel));
    check(e > 150.0 && e < 230.0, $sformatf("e-SP after 150 s at 7 Hz: %f", e));
    // no 2-AG: oscillation stops, e-SP decays
    ag[0] = '0; ag[1] = '0;
    for (int i = 0; i < 20000; i++) step(1'b0);
    nrel = 0;
    for (int i = 0; i < 60000; i++) step(i % 500 == 0);
    check(nrel == 0, $sformatf("releases without 2-AG: %0d", nrel));
    check(real'(esp) / 16777216.0 < e * 0.5, "e-SP decays without 2-AG");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
