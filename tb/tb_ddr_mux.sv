// tb_ddr_mux - drives da and db as registered serializer outputs (changing
// just after the rising edge of sclk) and checks the DDR order on dout:
// bit i of da during the high phase after rising edge i+1, then bit i of db
// during the following low phase, i.e. two bits per clock period.
`timescale 1ns/1ps
module tb_ddr_mux;
  localparam int NB = 200;
  logic sclk = 0, da = 0, db = 0, dout;
  bit a [NB], b [NB];
  int checks = 0, failures = 0;

  ddr_mux dut (.*);

  always #10 sclk = ~sclk;

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
    for (int i = 0; i < NB; i++) begin a[i] = 1'($urandom); b[i] = 1'($urandom); end
    for (int i = 0; i < NB; i++) begin
      @(posedge sclk);
      #1 da = a[i]; db = b[i];
    end
  end

  initial begin
    @(posedge sclk);                 // rising edge 0: a[0]/b[0] launched after it
    for (int i = 0; i < NB - 1; i++) begin
      @(posedge sclk);               // rising edge i+1
      #5 check(dout == a[i], $sformatf("high phase carries da[%0d]", i));
      #10 check(dout == b[i], $sformatf("low phase carries db[%0d]", i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
