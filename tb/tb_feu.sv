// tb_feu - 32 channels of ADC codes enter the unit the way the serializer
// delivers them (one channel per cycle, with its number, once per frame).
// Channel a (5) carries a tone at the centre of band 1; channel b (17) the
// same tone shifted by 60 degrees; every other channel carries random
// codes, so a wrong channel selection breaks the locking. After the
// filters settle the PLV of band 1 must be close to 1 (256). Then channel b's tone jumps by 180 degrees every half
// window, so the phase difference spends half of each window at 60 and half
// at 240 degrees and the PLV must fall well below that. Checks one result per 2^WIN_LOG2 frames, a PAC
// value above zero, and that a disabled unit produces nothing.
`timescale 1ns/1ps
module tb_feu;
  import erec_pkg::*;
  localparam int NB = 4, WL = 5, NWIN = 1 << WL, GAP = 250;
  logic clk = 0, rst_n = 0, en = 1, valid = 0;
  logic [4:0] ch = 0;
  feu_cfg_t cfg;
  logic [9:0] word = 0;
  logic [15:0] plv;
  logic [31:0] pac;
  logic feat_valid;
  int checks = 0, failures = 0, nfeat = 0;
  logic [15:0] last_plv;
  logic [31:0] last_pac;

  feu #(.N_BANDS(NB), .WIN_LOG2(WL)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n && feat_valid) begin nfeat++; last_plv = plv; last_pac = pac; end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin : watchdog
    repeat (8 * NWIN * GAP + 10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic frames(input int count, input int mode, inout int n);
    real pi = 3.14159265358979, f = 1.0 / 16.0;
    for (int k = 0; k < count; k++) begin
      for (int c = 0; c < 32; c++) begin
        @(negedge clk);
        ch = 5'(c);
        valid = 1;
        if (c == 5) word = 10'(512 + int'(400.0 * $cos(2.0 * pi * f * real'(n))));
        else if (c == 17 && mode == 0)
          word = 10'(512 + int'(400.0 * $cos(2.0 * pi * f * real'(n) - pi / 3.0)));
        else if (c == 17)
          word = 10'(512 + int'(400.0 * $cos(2.0 * pi * f * real'(n) - pi / 3.0 + (((n / (NWIN / 2)) % 2 == 1) ? pi : 0.0))));
        else word = 10'(112 + $urandom_range(800));
      end
      @(negedge clk);
      valid = 0;
      repeat (GAP) @(negedge clk);
      n++;
    end
  endtask

  initial begin
    int n = 0;
    logic [15:0] plv_locked;
    cfg = '{plv_band: 3'd1, pac_lo: 3'd2, pac_hi: 3'd1, ch_a: 5'd5, ch_b: 5'd17, default: '0};
    repeat (3) @(posedge clk);
    rst_n = 1;
    frames(2 * NWIN, 0, n);
    check(nfeat == 2, $sformatf("two windows, %0d results", nfeat));
    plv_locked = last_plv;
    check(plv_locked >= 225 && plv_locked <= 280, $sformatf("locked PLV %0d", plv_locked));
    check(last_pac > 0, "PAC computed");
    frames(2 * NWIN, 1, n);
    check(nfeat == 4, "four windows");
    check(last_plv < plv_locked / 2, $sformatf("PLV with phase jumps %0d", last_plv));
    en = 0;
    frames(NWIN + 2, 0, n);
    check(nfeat == 4, "disabled unit is silent");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
