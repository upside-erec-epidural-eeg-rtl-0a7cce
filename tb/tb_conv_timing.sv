// tb_conv_timing - checks the conversion sequencer: rstc/rsti/rstf are
// one-cycle pulses every CONV_CYCLES cycles, conv_last is the cycle before,
// fch toggles every FCH_DIV/2 cycles, and with the periodic reset enabled
// per_rst covers exactly every third conversion. Reduced conversion length.
`timescale 1ns/1ps
module tb_conv_timing;
  localparam int unsigned N = 16, FD = 4;
  logic clk = 0, rst_n = 0;
  logic rstc, rsti, rstf, fch, conv_last;
  logic [$clog2(N)-1:0] cycle;
  logic per_en = 0, per_rst;
  logic [15:0] per_period = 16'd3;
  int checks = 0, failures = 0;

  conv_timing #(.CONV_CYCLES(N), .FCH_DIV(FD)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t = 0, last_rst = -1, last_fch_t = -1, nconv = 0, nper = 0;
    bit prev_fch;
    repeat (3) @(posedge clk);
    rst_n = 1;
    per_en = 1;
    prev_fch = fch;
    for (t = 0; t < 200; t++) begin
      @(negedge clk);
      check(rsti == rstc && rstf == rstc, "rsti/rstf follow rstc");
      if (rstc) begin
        if (last_rst >= 0) check(t - last_rst == N, $sformatf("rstc period %0d", t - last_rst));
        last_rst = t;
        check(cycle == 0, "cycle 0 at rstc");
      end
      if (conv_last) begin
        check(cycle == N - 1, "conv_last in last cycle");
        nconv++;
        check(per_rst == (nconv % 3 == 0), $sformatf("per_rst in conversion %0d", nconv));
        nper += per_rst;
      end
      check(!(rstc && conv_last), "rstc and conv_last exclusive");
      if (fch != prev_fch) begin
        if (last_fch_t >= 0) check(t - last_fch_t == FD / 2, "fch half period");
        last_fch_t = t;
        prev_fch = fch;
      end
    end
    check(last_rst > 0, "rstc seen");
    check(nper == nconv / 3, "periodic reset count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
