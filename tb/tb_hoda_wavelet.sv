// tb_hoda_wavelet - random input; each output must equal the complex FIR
// sum over the last 8 samples with coefficients j^m
// (I: +1,0,-1,0,...; Q: 0,+1,0,-1,...). Then a tone at a quarter of the
// sample rate must give a constant magnitude of 4x its amplitude whose
// phase advances by 90 degrees per sample, while a tone at half the
// sample rate and a DC input must give zero output.
`timescale 1ns/1ps
module tb_hoda_wavelet;
  localparam int DW = 14;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic signed [DW-1:0] x = 0;
  logic signed [DW+2:0] i_out, q_out;
  int checks = 0, failures = 0;

  hoda_wavelet #(.L(8), .DW(DW)) dut (.*);

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

  task automatic push(input int v);
    @(negedge clk);
    x = DW'(v);
    in_valid = 1;
    @(negedge clk);
    in_valid = 0;
  endtask

  initial begin
    int h [$];
    int ei, eq;
    int tone [4] = '{1000, 0, -1000, 0};
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 8; k++) h.push_front(0);
    for (int n = 0; n < 500; n++) begin
      push(int'($signed(DW'($urandom)) >>> 1));
      h.push_front(int'(x));
      ei = h[0] - h[2] + h[4] - h[6];
      eq = h[1] - h[3] + h[5] - h[7];
      check(out_valid && int'(i_out) == ei && int'(q_out) == eq,
            $sformatf("n=%0d got %0d,%0d expected %0d,%0d", n, i_out, q_out, ei, eq));
    end
    // tone at fs/4: cos(pi n / 2) * 1000
    for (int n = 0; n < 16; n++) begin
      push(tone[n % 4]);
      if (n >= 8) begin
        // I,Q rotate: magnitude 4000 on one axis
        check((i_out == 0 && (q_out == 4000 || q_out == -4000)) ||
              (q_out == 0 && (i_out == 4000 || i_out == -4000)),
              $sformatf("fs/4 tone n=%0d: %0d %0d", n, i_out, q_out));
      end
    end
    // a tone at fs/2 (alternating sign) must vanish in I and Q
    for (int n = 0; n < 16; n++) begin
      push((n % 2) ? -1000 : 1000);
      if (n >= 8) check(i_out == 0 && q_out == 0, $sformatf("fs/2 rejected n=%0d", n));
    end
    // DC must vanish
    for (int n = 0; n < 16; n++) begin
      push(1000);
      if (n >= 8) check(i_out == 0 && q_out == 0, "DC rejected");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
