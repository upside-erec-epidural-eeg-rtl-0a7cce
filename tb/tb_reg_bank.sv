// tb_reg_bank - writes every address and reads every address back:
// write-read registers return what was written (masked to their fields),
// read-only registers return the status inputs and ignore writes, and the
// configuration outputs carry the written fields. Also checks reset values.
`timescale 1ns/1ps
module tb_reg_bank;
  import erec_pkg::*;
  logic clk = 0, rst_n = 0, wr_en = 0;
  logic [3:0] addr = 0;
  logic [31:0] wdata = 0, rdata;
  cfg_t cfg;
  sts_t sts;
  int checks = 0, failures = 0;

  reg_bank dut (.*);

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

  task automatic wr(input int a, input logic [31:0] d);
    @(negedge clk);
    addr = 4'(a); wdata = d; wr_en = 1;
    @(negedge clk);
    wr_en = 0;
  endtask

  function automatic logic [31:0] mask(input int a);
    case (a)
      0: return 32'hFFFF_FFFF;
      1, 2: return 32'hFFFF_FFFF;
      3, 4: return 32'h07FF_FFFF;
      default: return 32'h0;
    endcase
  endfunction

  initial begin
    logic [31:0] v [10];
    sts = '{plv0: 16'h1234, pac0: 32'hCAFE_0001, plv1: 16'h00AB, pac1: 32'h0BAD_F00D, status: 32'h0005_0042};
    repeat (2) @(posedge clk);
    addr = 0; #1 check(rdata == 32'h03E8_0003, "CTRL reset: serializer and FEU enabled, period 1000");
    addr = 3; #1 check(rdata == 32'h0042_0100, $sformatf("FEU0_CFG reset value %h", rdata));
    rst_n = 1;
    for (int r = 0; r < 5; r++) begin
      for (int a = 0; a < 10; a++) begin
        v[a] = $urandom;
        wr(a, v[a]);
      end
      for (int a = 0; a < 12; a++) begin
        addr = 4'(a);
        #1;
        case (a)
          5: check(rdata == 32'h1234, "FEU0_PLV read-only");
          6: check(rdata == 32'hCAFE_0001, "FEU0_PAC read-only");
          7: check(rdata == 32'h00AB, "FEU1_PLV read-only");
          8: check(rdata == 32'h0BAD_F00D, "FEU1_PAC read-only");
          9: check(rdata == 32'h0005_0042, "STATUS read-only");
          10, 11: check(rdata == 0, "unused address reads zero");
          default: check(rdata == (v[a] & mask(a)), $sformatf("addr %0d read back %h expected %h", a, rdata, v[a] & mask(a)));
        endcase
      end
      check(cfg.sw_ext == {v[2], v[1]}, "sw_ext output");
      check(cfg.feu1.ch_b == v[4][12:8] && cfg.feu1.plv_band == v[4][18:16], "feu1 cfg output");
      check(cfg.ctrl.feout_sel == v[0][7:4] && cfg.ctrl.sw_sel == v[0][3], "ctrl output");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
