// tb_afe_channel - checks the behavioural modulator: over a conversion the
// number of ones of q equals u * cycles within two counts, where
// u = 0.5 + vin/(2*FS), for several DC inputs; the bias switch removes a
// DC step at once.
`timescale 1ns/1ps
module tb_afe_channel;
  localparam int unsigned N = 512;
  logic clk = 0, rstc = 0, fch = 0, sw = 0;
  real vin_uv = 0.0;
  logic q;
  int checks = 0, failures = 0;

  afe_channel #(.FS_UV(2000.0), .HP_CYCLES(1.0e9)) dut (
    .clk, .vin_uv, .rstc, .rsti(1'b0), .rstf(1'b0), .fch, .sw, .q);

  always #5 clk = ~clk;
  always @(posedge clk) fch <= ~fch;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin : watchdog
    repeat (20 * N) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one conversion: rstc in cycle 0, count q seen in cycles 1..N-1
  task automatic convert(output int ones);
    ones = 0;
    for (int k = 0; k < N; k++) begin
      @(negedge clk);
      if (k > 0 && q) ones++;
      rstc = (k == N - 1);
    end
    @(negedge clk);
    rstc = 0;
  endtask

  initial begin
    real vs [6] = '{0.0, 1000.0, -1000.0, 1900.0, -1900.0, 3000.0};
    real u;
    int ones, expd;
    rstc = 1;
    @(negedge clk);
    rstc = 0;
    sw = 1;
    @(negedge clk);  // bias switch sets the DC level to 0 µV input
    sw = 0;
    for (int i = 0; i < 6; i++) begin
      vin_uv = vs[i];
      convert(ones);
      u = 0.5 + vs[i] / 4000.0;
      if (u > 1.0) u = 1.0;
      expd = int'(u * (N - 2));
      check(ones >= expd - 2 && ones <= expd + 2,
            $sformatf("vin %f: %0d ones, expected %0d", vs[i], ones, expd));
    end
    // AC coupling: closing the switch with a large DC input recentres it
    vin_uv = 50000.0;
    sw = 1;
    @(negedge clk);
    sw = 0;
    convert(ones);
    expd = (N - 2) / 2;
    check(ones >= expd - 2 && ones <= expd + 2, $sformatf("after bias reset %0d ones", ones));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
