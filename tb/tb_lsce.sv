// tb_lsce - random complex values (and the axis/diagonal corner cases):
// the estimate must lie between 0.93 and 1.05 of sqrt(I^2 + Q^2).
`timescale 1ns/1ps
module tb_lsce;
  localparam int W = 17;
  logic signed [W-1:0] i_in, q_in;
  logic [W-1:0] mag;
  int checks = 0, failures = 0;

  lsce #(.W(W)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real t, r;
    int vi [6] = '{65535, -65536, 0, 40000, -40000, 1000};
    int vq [6] = '{0, 0, -65536, 40000, 40000, 0};
    for (int k = 0; k < 2006; k++) begin
      if (k < 6) begin i_in = W'(vi[k]); q_in = W'(vq[k]); end
      else begin i_in = W'($urandom); q_in = W'($urandom); end
      #1;
      t = $sqrt(real'(i_in) * real'(i_in) + real'(q_in) * real'(q_in));
      r = (t > 0.0) ? real'(mag) / t : 1.0;
      if (t < 64.0) check(mag <= W'(int'(t * 1.1) + 2), "small values");
      else check(r > 0.93 && r < 1.05, $sformatf("I=%0d Q=%0d mag=%0d true=%f", i_in, q_in, mag, t));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
