// tb_lpf_dec2 - random samples with random gaps between them; every second
// sample must produce y = floor((x[n] + 2x[n-1] + x[n-2]) / 4), computed
// here from the stored input history, with out_valid one cycle later.
`timescale 1ns/1ps
module tb_lpf_dec2;
  localparam int DW = 14;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic signed [DW-1:0] x = 0, y;
  int checks = 0, failures = 0;

  lpf_dec2 #(.DW(DW)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int h [$];
    int e, nout = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    h = '{0, 0};
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      x = DW'($signed(DW'($urandom)) >>> 1);
      in_valid = 1;
      h.push_front(int'(x));
      @(negedge clk);
      in_valid = 0;
      if (n % 2 == 1) begin
        e = (h[0] + 2 * h[1] + h[2]) >>> 2;
        check(out_valid, "out_valid after every second sample");
        check(int'(y) == e, $sformatf("n=%0d y=%0d expected %0d", n, y, e));
        nout++;
      end else begin
        check(!out_valid, "no output after odd sample");
      end
      repeat ($urandom_range(3)) @(negedge clk);
    end
    check(nout == 500, "decimation by two");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
