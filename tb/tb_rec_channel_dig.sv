// tb_rec_channel_dig - checks the channel counter: D_out = {number of ones
// of q in cycles 1..N-2, q of the last cycle}, dout_valid one cycle after
// the last cycle, the saturation flag sw_int for the following conversion,
// a periodic reset request, and the sw_ext/sw_int mux. q is random with a
// per-conversion density.
`timescale 1ns/1ps
module tb_rec_channel_dig;
  localparam int unsigned N = 512;
  logic clk = 0, rst_n = 0;
  logic q = 0, rstc = 0, conv_last = 0, sw_ext = 0, sw_sel = 0, per_rst = 0;
  logic [9:0] dout;
  logic dout_valid, sw, sw_int;
  int checks = 0, failures = 0;

  rec_channel_dig dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin : watchdog
    repeat (40 * N) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int dens [8] = '{0, 100, 50, 1000, 999, 500, 1000, 300};  // per mille
    int ones, exp_code;
    bit exp_sat;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < 8; c++) begin
      ones = 0;
      for (int k = 0; k < N; k++) begin
        @(negedge clk);
        rstc      = (k == 0);
        conv_last = (k == N - 1);
        per_rst   = (c == 5);
        q = ($urandom_range(999) < dens[c]);
        if (dens[c] == 1000) q = 1;
        if (k != 0 && k != N - 1 && q) ones++;
        if (k == 1 && c > 0) check(sw_int == exp_sat, $sformatf("sw_int after conversion %0d", c - 1));
      end
      exp_code = ones * 2 + q;
      exp_sat  = (ones <= 4) || (ones >= 511 - 4) || (c == 5);
      @(negedge clk);
      rstc = 1; conv_last = 0;
      check(dout_valid, "dout_valid one cycle after conv_last");
      check(dout == 10'(exp_code), $sformatf("conversion %0d: dout %0d expected %0d", c, dout, exp_code));
      @(negedge clk);
      check(!dout_valid, "dout_valid is one cycle");
      rstc = 0;
      // mux
      sw_sel = 1; sw_ext = 1; #1 check(sw == 1, "sw_ext selected (1)");
      sw_ext = 0; #1 check(sw == 0, "sw_ext selected (0)");
      sw_sel = 0; #1 check(sw == sw_int, "sw_int selected");
      check(sw_int == exp_sat, "sw_int value");
      // restart: the loop supplies the next rstc in its first cycle
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
