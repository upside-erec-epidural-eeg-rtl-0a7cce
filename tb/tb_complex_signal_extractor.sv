// tb_complex_signal_extractor - feeds ADC codes of a sine at the centre of
// one band (fs/2^(k+3)) and checks: band k's magnitude is close to the
// value expected from the filter gains (|H_lpf| of every stage times L/2
// of the wavelet), the other bands are much smaller, and band k updates
// once per 2^(k+1) input samples. Four bands to keep the run short.
`timescale 1ns/1ps
module tb_complex_signal_extractor;
  import erec_pkg::*;
  localparam int NB = 4;
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic [9:0] x = 512;
  logic signed [CPX_W-1:0] band_i [NB], band_q [NB];
  logic [NB-1:0] band_valid;
  int checks = 0, failures = 0;
  int nvalid [NB];

  complex_signal_extractor #(.N_BANDS(NB)) dut (.*);

  always #5 clk = ~clk;

  always @(posedge clk) for (int k = 0; k < NB; k++) if (band_valid[k]) nvalid[k]++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real mag(input int k);
    return $sqrt(real'(band_i[k]) ** 2 + real'(band_q[k]) ** 2);
  endfunction

  initial begin
    real pi = 3.14159265358979;
    real f, g, m, mmin, mmax;
    int nsmp;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int kb = 0; kb < NB; kb++) begin
      f = 1.0 / real'(2 ** (kb + 3));            // cycles per input sample
      g = 4.0 * 300.0;                            // L/2 * amplitude
      for (int s = 0; s <= kb; s++) g = g * (1.0 + $cos(2.0 * pi * f * real'(2 ** s))) / 2.0;
      nsmp = 64 * (2 ** (kb + 1));
      for (int k = 0; k < NB; k++) nvalid[k] = 0;
      mmin = 1.0e9; mmax = 0.0;
      for (int n = 0; n < nsmp; n++) begin
        @(negedge clk);
        x = 10'(512 + int'($floor(300.0 * $cos(2.0 * pi * f * real'(n)) + 0.5)));
        in_valid = 1;
        @(negedge clk);
        in_valid = 0;
        repeat (NB + 2) @(negedge clk);
        if (n > nsmp / 2) begin
          m = mag(kb);
          if (m < mmin) mmin = m;
          if (m > mmax) mmax = m;
        end
      end
      check(mmin > 0.8 * g && mmax < 1.2 * g, $sformatf("band %0d magnitude %f..%f expected %f", kb, mmin, mmax, g));
      for (int k = 0; k < NB; k++)
        if (k != kb) check(mag(k) < 0.5 * g, $sformatf("tone of band %0d leaks into band %0d: %f", kb, k, mag(k)));
      for (int k = 0; k < NB; k++)
        check(nvalid[k] == nsmp / (2 ** (k + 1)) || nvalid[k] == nsmp / (2 ** (k + 1)) + 1 ||
              nvalid[k] == nsmp / (2 ** (k + 1)) - 1,
              $sformatf("band %0d rate: %0d outputs for %0d samples", k, nvalid[k], nsmp));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
