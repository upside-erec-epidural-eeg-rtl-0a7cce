// tb_spi_slave - acts as SPI master (mode 0: drive on the falling edge,
// sample on the rising edge) and checks 40-bit frames: a write frame
// raises wr_en on exactly one rising edge with the right address and data;
// a read frame returns the word of the addressed register on miso, MSB
// first; miso is low while cs_n is high.
`timescale 1ns/1ps
module tb_spi_slave;
  logic sclk = 0, cs_n = 0, mosi = 0, miso, wr_en;
  logic [3:0] addr;
  logic [31:0] wdata, rdata;
  int checks = 0, failures = 0;
  int n_wr = 0;
  logic [3:0] last_addr;
  logic [31:0] last_data;

  spi_slave dut (.*);

  // register model seen by the slave: a fixed function of the address
  assign rdata = {addr, 4'h5, ~addr, 4'hA, addr, 4'h3, ~addr, 4'hC};

  always @(posedge sclk) if (wr_en) begin
    n_wr++;
    last_addr = addr;
    last_data = wdata;
  end

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

  task automatic frame(input logic [7:0] cmd, input logic [31:0] data, output logic [31:0] rd);
    logic [39:0] tx;
    tx = {cmd, data};
    cs_n = 0;
    for (int i = 39; i >= 0; i--) begin
      mosi = tx[i];
      #50 sclk = 1;
      if (i < 32) rd[i] = miso;
      #50 sclk = 0;
    end
    #50 cs_n = 1;
    #100;
  endtask

  initial begin
    logic [31:0] rd, v;
    logic [3:0] a;
    #100 cs_n = 1;      // the rising edge of cs_n clears the frame state
    #100;
    check(miso == 0, "miso low when idle");
    for (int k = 0; k < 12; k++) begin
      a = 4'($urandom_range(9));
      v = $urandom;
      n_wr = 0;
      frame({1'b1, 3'b000, a}, v, rd);
      check(n_wr == 1, "one write strobe per write frame");
      check(last_addr == a && last_data == v, $sformatf("write addr %0d data %h got %0d %h", a, v, last_addr, last_data));
      n_wr = 0;
      frame({1'b0, 3'b000, a}, $urandom, rd);
      check(n_wr == 0, "no write strobe on read");
      check(rd == {a, 4'h5, ~a, 4'hA, a, 4'h3, ~a, 4'hC}, $sformatf("read addr %0d got %h", a, rd));
      check(miso == 0, "miso low after frame");
    end
    // aborted frame: no write
    n_wr = 0;
    cs_n = 0;
    for (int i = 0; i < 20; i++) begin mosi = 1; #50 sclk = 1; #50 sclk = 0; end
    cs_n = 1; #100;
    check(n_wr == 0, "aborted frame writes nothing");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
