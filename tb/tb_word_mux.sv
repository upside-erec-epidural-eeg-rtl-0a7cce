// tb_word_mux - checks the 320:10 word mux and the 10:1 bit mux with
// random data for every select value, and zero for out-of-range selects.
`timescale 1ns/1ps
module tb_word_mux;
  logic [319:0] din;
  logic [4:0]   sel;
  logic [9:0]   dout;
  logic [9:0]   bdin;
  logic [3:0]   bsel;
  logic         bdout;
  int checks = 0, failures = 0;

  word_mux #(.N(32), .W(10)) dut_w (.din(din),  .sel(sel),  .dout(dout));
  word_mux #(.N(10), .W(1))  dut_b (.din(bdin), .sel(bsel), .dout(bdout));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 20; r++) begin
      for (int k = 0; k < 10; k++) din[k*32 +: 32] = $urandom;
      bdin = 10'($urandom);
      for (int s = 0; s < 32; s++) begin
        sel = 5'(s);
        #1 check(dout == din[s*10 +: 10], $sformatf("word %0d", s));
      end
      for (int s = 0; s < 16; s++) begin
        bsel = 4'(s);
        #1 check(bdout == ((s < 10) ? bdin[s] : 1'b0), $sformatf("bit %0d", s));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
