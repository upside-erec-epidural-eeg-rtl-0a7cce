// tb_erec - end-to-end test of the recording chip at its default sizes.
//
// 64 electrode signals (each a large DC electrode offset plus a sine) drive
// the chip. The test configures the chip over SPI, holds the input bias
// switches closed for the first conversions (external control) so the AC
// coupling absorbs the offsets, then hands the switches to the on-chip
// artifact logic. It decodes the DDR output stream frame by frame from
// sync and checks:
//  - every serialized result equals the channel's 10-bit result, on both
//    DDR lines (channels 0..31 on the high phase, 32..63 on the low phase);
//  - every result matches, within 4 codes, the code an ideal incremental
//    ADC with a +/-2 mV range gives for the mean input over the conversion
//    (1019 * mean of 0.5 + v/4000, v the input minus the level the AC
//    coupling removed, read from the analog model);
//  - a 30 mV step on channel 20 saturates it, the artifact logic closes
//    its bias switches and the channel is back in range two conversions
//    later; STATUS read over SPI shows the flagged channel;
//  - after 1024 conversions both feature-extraction units report; unit 0
//    compares two 62.5 Hz tones 60 degrees apart (PLV near 1), unit 1 a
//    62.5 Hz and a 70 Hz tone (lower PLV); unit 0's channel a carries a
//    62.5 Hz tone whose amplitude follows a 15.6 Hz rhythm, unit 1's the
//    same components uncoupled (PAC of unit 0 at least 1.5x unit 1); the
//    values read over SPI equal the output ports;
//  - the feout monitor follows the selected source;
//  - with the periodic bias reset enabled (period 4 conversions) every
//    channel closes its bias switches in every fourth conversion.
// Each mechanism is counted and one that never happened counts a failure.
`timescale 1ns/1ps
module tb_erec;
  import erec_pkg::*;
  localparam int  NCONV = 1060;
  localparam real TCLK  = 1953.125;             // 512 kHz
  localparam real PI    = 3.14159265358979;
  localparam int  ART_CH = 20, ART_CONV = 60;

  logic clk = 0, rst_n = 0, cs_n = 0, sclk = 0, mosi = 0;
  logic miso, dout, sync, feout;
  logic [15:0] plv [2];
  logic [31:0] pac [2];
  real vin_uv [N_CH];
  int checks = 0, failures = 0;

  // mechanism counters
  int n_frames = 0, n_spi_wr = 0, n_spi_rd = 0, n_ext_sw = 0, n_artifact = 0;
  int n_recover = 0, n_feat = 0, n_ddr_a = 0, n_ddr_b = 0, n_feout = 0, n_periodic = 0;

  erec dut (.*);

  always #(TCLK / 2.0) clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 30) $display("FAIL %s", what); end
  endtask

  initial begin : watchdog
    #((NCONV + 20) * 512 * TCLK);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- electrode signals ----------------
  function automatic real sig(input int c, input real t);   // sine part, µV
    case (c)
      // 62.5 Hz carrier whose amplitude follows the phase of a 15.6 Hz rhythm
      0:  return 700.0 * (1.0 + 0.8 * $sin(2.0 * PI * 15.625 * t)) * $sin(2.0 * PI * 62.5 * t)
                 + 400.0 * $sin(2.0 * PI * 15.625 * t);
      1:  return  800.0 * $sin(2.0 * PI * 62.5 * t - PI / 3.0);
      // same components without the coupling
      34: return 700.0 * $sin(2.0 * PI * 62.5 * t) + 400.0 * $sin(2.0 * PI * 15.625 * t);
      35: return 1000.0 * $sin(2.0 * PI * 70.0 * t);
      default: return 600.0 * $sin(2.0 * PI * (3.0 + 2.0 * real'(c)) * t + real'(c));
    endcase
  endfunction

  function automatic real offset(input int c);                // electrode DC offset, µV
    return 1000.0 * real'((c * 37) % 200 - 100);              // -100..+99 mV
  endfunction

  int  conv_idx = 0;
  real art = 0.0;
  real sum_sig [N_CH];   // sum of u over the counted cycles of a conversion
  real exp_code [N_CH];
  bit  exp_ok = 0;

  always @(negedge clk) begin
    real t;
    t = $realtime * 1.0e-9;
    for (int c = 0; c < N_CH; c++) vin_uv[c] = offset(c) + sig(c, t) + ((c == ART_CH) ? art : 0.0);
  end

  // reference code of an ideal incremental ADC: the mean of the normalised
  // input u = 0.5 + (vin - dc)/4000 (clipped to 0..1) over the counted
  // cycles of a conversion, times the 1019-code span. dc is the level the
  // AC coupling removes, read from the analog model; the counter adds the
  // decisions of cycles 1..510.
  for (genvar c = 0; c < N_CH; c++) begin : g_ref
    always @(posedge clk) if (rst_n) begin
      real u;
      u = 0.5 + (vin_uv[c] - dut.g_ch[c].u_afe.dc) / 4000.0;
      if (u > 1.0) u = 1.0;
      if (u < 0.0) u = 0.0;
      if (dut.cycle == 9'd0) sum_sig[c] = 0.0;
      else if (dut.cycle <= 9'd510) sum_sig[c] += u;
      if (dut.cycle == 9'd511) exp_code[c] = 1019.0 * sum_sig[c] / 510.0;
    end
  end

  // ---------------- SPI master ----------------
  task automatic spi(input bit wr, input logic [3:0] a, input logic [31:0] d, output logic [31:0] rd);
    logic [39:0] tx;
    tx = {wr, 3'b000, a, d};
    cs_n = 0;
    for (int i = 39; i >= 0; i--) begin
      mosi = tx[i];
      #500 sclk = 1;
      if (i < 32) rd[i] = miso;
      #500 sclk = 0;
    end
    #500 cs_n = 1;
    #1000;
    if (wr) n_spi_wr++; else n_spi_rd++;
  endtask

  task automatic wreg(input logic [3:0] a, input logic [31:0] d);
    logic [31:0] rd, back;
    spi(1, a, d, rd);
    spi(0, a, 0, back);
    check(back == d, $sformatf("register %0d read back %h, wrote %h", a, back, d));
  endtask

  // ---------------- DDR stream decoder ----------------
  // line a (channels 0..31) is on dout in the high phase, line b in the low phase
  logic [9:0] rx_a [32], rx_b [32];
  int  bitpos = -1;

  // sync and the line bits are registered on the rising edge; sampled at
  // the falling edge they are stable. The bit registered in a cycle is on
  // dout in the high phase of the next cycle (line a) and the low phase
  // after it (line b).
  always @(negedge clk) begin
    if (sync) bitpos = 0;
    else if (bitpos >= 0 && bitpos < 320) bitpos++;
    if (bitpos >= 0 && bitpos < 320) begin
      fork
        begin
          automatic int p = bitpos;
          #(0.75 * TCLK);
          rx_a[p / 10][9 - p % 10] = dout;
          n_ddr_a++;
          #(0.5 * TCLK);
          rx_b[p / 10][9 - p % 10] = dout;
          n_ddr_b++;
          if (p == 319) frame_done();
        end
      join_none
    end
  end

  task automatic frame_done();
    int e;
    n_frames++;
    for (int c = 0; c < 32; c++) begin
      check(rx_a[c] == dut.code[c], $sformatf("frame %0d line a channel %0d: %0d vs %0d", n_frames, c, rx_a[c], dut.code[c]));
      check(rx_b[c] == dut.code[c + 32], $sformatf("frame %0d line b channel %0d", n_frames, c + 32));
    end
    if (exp_ok) begin
      for (int c = 0; c < N_CH; c++) begin
        if (c == ART_CH && conv_idx >= ART_CONV - 1 && conv_idx <= ART_CONV + 2) continue;
        e = int'(exp_code[c]);
        check(int'(dut.code[c]) >= e - 4 && int'(dut.code[c]) <= e + 4,
              $sformatf("conversion %0d channel %0d: code %0d expected %0d", conv_idx, c, dut.code[c], e));
      end
    end
  endtask

  // count conversions (results latched at the end of cycle 511)
  always @(posedge clk) if (rst_n && dut.dvalid[0]) conv_idx++;

  always @(posedge clk) if (rst_n) begin
    if (dut.fvalid[0]) n_feat++;
    if (dut.fvalid[1]) n_feat++;
  end

  // ---------------- main sequence ----------------
  initial begin
    logic [31:0] rd;
    int code_art;
    #3000 cs_n = 1;
    repeat (4) @(posedge clk);
    rst_n = 1;
    // external bias switch control: all switches closed
    wreg(REG_SW_LO, 32'hFFFF_FFFF);
    wreg(REG_SW_HI, 32'hFFFF_FFFF);
    wreg(REG_CTRL, 32'h0000_000B);                   // ser, feu, sw_sel=1, feout=conv strobe
    wreg(REG_FEU0_CFG, 32'h0131_0100);                // a=0 b=1 plv band 1, pac lo 3, hi 1
    wreg(REG_FEU1_CFG, 32'h0131_0302);                // a=2 b=3 (channels 34, 35)
    // feout = conversion strobe
    repeat (3) begin
      wait (dut.conv_last == 1);
      @(negedge clk);
      check(feout == 1, "feout = conversion strobe");
      @(negedge clk);
      check(feout == 0, "feout strobe ends");
      n_feout++;
    end
    check(dut.sw == '1, "external control closes every bias switch");
    if (dut.sw == '1) n_ext_sw++;
    // two conversions with switches closed, then internal logic
    wait (conv_idx == 4);
    wreg(REG_SW_LO, 32'h0);
    wreg(REG_SW_HI, 32'h0);
    wreg(REG_CTRL, 32'h0000_0043);                   // sw_sel=0, feout = any artifact
    wait (conv_idx == 7);
    exp_ok = 1;
    // artifact on channel ART_CH
    wait (conv_idx == ART_CONV);
    art = 30000.0;
    wait (conv_idx == ART_CONV + 1);
    @(posedge clk);
    code_art = int'(dut.code[ART_CH]);
    check(dut.sw_int[ART_CH], $sformatf("artifact flagged (code %0d)", code_art));
    if (dut.sw_int[ART_CH]) n_artifact++;
    check(feout == 1, "feout shows the artifact");
    if (feout) n_feout++;
    spi(0, REG_STATUS, 0, rd);
    check(rd[22:16] >= 1, $sformatf("STATUS counts flagged channels: %0d", rd[22:16]));
    wait (conv_idx == ART_CONV + 3);
    @(posedge clk);
    code_art = int'(dut.code[ART_CH]);
    check(code_art > 300 && code_art < 720, $sformatf("channel recovered, code %0d", code_art));
    check(!dut.sw_int[ART_CH], "artifact flag cleared");
    if (code_art > 300 && code_art < 720) n_recover++;
    // features
    wait (n_feat >= 2);
    repeat (10) @(posedge clk);
    $display("FEU0 PLV %0d PAC %0d, FEU1 PLV %0d PAC %0d", plv[0], pac[0], plv[1], pac[1]);
    check(plv[0] >= 220 && plv[0] <= 280, $sformatf("FEU0 PLV of locked tones %0d", plv[0]));
    check(plv[1] < plv[0], $sformatf("FEU1 PLV of different tones %0d", plv[1]));
    check(2 * pac[0] > 3 * pac[1], $sformatf("PAC of coupled signal %0d above uncoupled %0d", pac[0], pac[1]));
    spi(0, REG_FEU0_PLV, 0, rd);  check(rd == 32'(plv[0]), "PLV0 over SPI");
    spi(0, REG_FEU0_PAC, 0, rd);  check(rd == pac[0], "PAC0 over SPI");
    spi(0, REG_FEU1_PLV, 0, rd);  check(rd == 32'(plv[1]), "PLV1 over SPI");
    spi(0, REG_FEU1_PAC, 0, rd);  check(rd == pac[1], "PAC1 over SPI");
    spi(0, REG_STATUS, 0, rd);
    check(rd[15:0] == 16'(conv_idx), $sformatf("frame counter %0d vs %0d", rd[15:0], conv_idx));
    // periodic bias reset every 4 conversions
    begin
      int c0, nall;
      exp_ok = 0;
      wreg(REG_CTRL, 32'h0004_0143);
      c0 = conv_idx;
      nall = 0;
      while (conv_idx < c0 + 13) begin
        @(posedge clk);
        if (dut.cycle == 9'd5 && dut.sw_int == '1) nall++;
      end
      check(nall >= 3 && nall <= 4, $sformatf("periodic reset in %0d of 12 conversions", nall));
      n_periodic = nall;
    end
    // mechanism coverage
    $display("frames %0d, ddr bits a %0d b %0d, spi wr %0d rd %0d, ext sw %0d, artifacts %0d, recoveries %0d, features %0d, feout %0d, periodic %0d",
             n_frames, n_ddr_a, n_ddr_b, n_spi_wr, n_spi_rd, n_ext_sw, n_artifact, n_recover, n_feat, n_feout, n_periodic);
    check(n_frames > 1000, "serializer frames");
    check(n_ddr_a > 0 && n_ddr_b > 0, "both DDR lines");
    check(n_spi_wr > 0 && n_spi_rd > 0, "SPI writes and reads");
    check(n_ext_sw > 0, "external switch control");
    check(n_artifact > 0, "artifact detection");
    check(n_recover > 0, "artifact recovery");
    check(n_feat >= 2, "feature results");
    check(n_feout > 0, "feout monitor");
    check(n_periodic > 0, "periodic bias reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
