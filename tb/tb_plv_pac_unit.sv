// tb_plv_pac_unit - window of 16 ticks (WIN_LOG2=4). Channel a and b carry
// rotating phasors with a fixed phase offset, so PLV must be close to 1
// (256 in Q.8); then b's phase is flipped by 180 degrees on every other
// tick, so PLV must be close to 0. PAC is compared with
// |mean |z_hi| exp(j phase(z_lo))| computed here with floating point, where
// the z_hi amplitude is modulated by the z_lo phase. Also checks the
// number of cycles one tick takes and that feat_valid comes once per window.
`timescale 1ns/1ps
module tb_plv_pac_unit;
  import erec_pkg::*;
  localparam int WL = 4, NWIN = 1 << WL;
  logic clk = 0, rst_n = 0, tick = 0;
  logic signed [CPX_W-1:0] za_i, za_q, zb_i, zb_q, zl_i, zl_q, zh_i, zh_q;
  logic [15:0] plv;
  logic [31:0] pac;
  logic feat_valid, busy;
  int checks = 0, failures = 0, nfeat = 0;

  plv_pac_unit #(.WIN_LOG2(WL)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) if (feat_valid) nfeat++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic signed [CPX_W-1:0] r2i(input real v);
    return CPX_W'(int'($floor(v + 0.5)));
  endfunction

  // one window; mode 0: locked, mode 1: alternating
  task automatic run_window(input int mode, input int seed, output real pac_ref);
    real th, ph, m, sc, ss;
    int cyc, maxcyc;
    sc = 0.0; ss = 0.0; maxcyc = 0;
    for (int n = 0; n < NWIN; n++) begin
      th = 0.7 * real'(n + seed);
      ph = 0.45 * real'(n + seed);
      m  = 2000.0 * (1.0 + 0.6 * $cos(ph - 0.5));
      za_i = r2i(5000.0 * $cos(th));        za_q = r2i(5000.0 * $sin(th));
      zb_i = r2i(3000.0 * $cos(th - 1.0 + ((mode == 1 && n % 2 == 1) ? 3.14159265 : 0.0)));
      zb_q = r2i(3000.0 * $sin(th - 1.0 + ((mode == 1 && n % 2 == 1) ? 3.14159265 : 0.0)));
      zl_i = r2i(4000.0 * $cos(ph));        zl_q = r2i(4000.0 * $sin(ph));
      zh_i = r2i(m * $cos(1.3 * real'(n))); zh_q = r2i(m * $sin(1.3 * real'(n)));
      sc += m * $cos(ph);
      ss += m * $sin(ph);
      @(negedge clk);
      tick = 1;
      @(negedge clk);
      tick = 0;
      cyc = 1;
      while (busy) begin @(negedge clk); cyc++; end
      if (cyc > maxcyc) maxcyc = cyc;
    end
    pac_ref = $sqrt(sc * sc + ss * ss) / real'(NWIN);
    check(maxcyc <= 6 * (CPX_W + FRAC_W + 2) + 4, $sformatf("tick took %0d cycles", maxcyc));
  endtask

  initial begin
    real pref;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run_window(0, 0, pref);
    @(negedge clk);
    check(nfeat == 1, "one result per window");
    check(plv >= 236 && plv <= 276, $sformatf("locked PLV %0d", plv));
    check(real'(pac) > 0.9 * pref && real'(pac) < 1.1 * pref, $sformatf("PAC %0d expected %f", pac, pref));
    run_window(1, 3, pref);
    @(negedge clk);
    check(nfeat == 2, "second result");
    check(plv <= 20, $sformatf("anti-locked PLV %0d", plv));
    check(real'(pac) > 0.9 * pref && real'(pac) < 1.1 * pref, $sformatf("PAC %0d expected %f", pac, pref));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
