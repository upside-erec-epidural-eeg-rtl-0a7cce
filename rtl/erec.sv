// erec - epidural neural recording chip: 64 channels, raw-data serializer,
// SPI register bank and two PLV/PAC feature-extraction units.
//
// Each of the 64 channels is an AC-coupled incremental delta-sigma ADC:
// the analog part (afe_channel, a behavioural model) produces a comparator
// bitstream q at 512 kHz and the digital part (rec_channel_dig) counts it
// into a 10-bit result once per conversion of CONV_LEN clocks (1 kS/s).
// A shared sequencer (conv_timing) frames the conversions for all channels
// and can request a periodic reset of every channel's input bias network.
// The array is split into two halves of 32 channels. Each half has a
// serializer (data_serializer) that sends its 320 result bits per
// conversion on one line (da, db); the DDR stage (ddr_mux) merges da and db
// into dout at twice the bit rate, and sync marks the first bit of a frame.
// Each half also has a feature-extraction unit (feu) that borrows the
// serializer's channel mux to pick up every channel of its half, splits
// each into complex band signals and reports PLV and PAC of selected
// channels and bands. One SPI slave (spi_slave) with a 10 x 32-bit register bank
// (reg_bank) configures everything and reads the features back. feout is a
// monitor pin whose source is chosen in the control register:
//   0 conversion strobe, 1 sync, 2 FEU0 result strobe, 3 FEU1 result
//   strobe, 4 any channel in artifact recovery, 5 bitstream q of channel 0.
//
// Clocks: clk (512 kHz) runs the channels, serializers, DDR stage and
// feature extraction; sclk runs only the SPI slave and the register bank.
// The configuration is static while the chip records and crosses to clk
// without synchronisers; read-only values change once per conversion.
//
// The channel count, the 10-bit results, the two 32-channel serializers
// with a DDR output and sync, the two feature-extraction units and the
// SPI/register-bank follow the specification. The single shared register
// bank, the feout assignments and the timing choices listed in the
// submodules are this design's own. Bias generation and the analog
// reference/bias pins are not part of this model.
module erec
  import erec_pkg::*;
#(
  parameter int unsigned CONV_LEN    = erec_pkg::CONV_CYCLES,
  parameter int unsigned N_BANDS     = 6,
  parameter int unsigned WIN_LOG2    = 10
) (
  input  logic        clk,
  input  logic        rst_n,
  input  real         vin_uv [N_CH],   // v_elec - v_REF per channel, microvolts
  input  logic        cs_n,
  input  logic        sclk,
  input  logic        mosi,
  output logic        miso,
  output logic        dout,
  output logic        sync,
  output logic        feout,
  output logic [15:0] plv [2],
  output logic [31:0] pac [2]
);
  localparam int unsigned CW = $clog2(CONV_LEN);

  // ---------------- conversion timing ----------------
  logic rstc, rsti, rstf, fch, conv_last, per_rst;
  logic [CW-1:0] cycle;
  cfg_t          cfg;

  conv_timing #(.CONV_CYCLES(CONV_LEN)) u_tim (
    .clk, .rst_n, .rstc, .rsti, .rstf, .fch, .conv_last, .cycle,
    .per_en(cfg.ctrl.per_en), .per_period(cfg.ctrl.per_period), .per_rst);

  // ---------------- register bank ----------------
  sts_t              sts;
  logic              wr_en;
  logic [REG_AW-1:0] addr;
  logic [31:0]       wdata, rdata;

  spi_slave #(.AW(REG_AW), .DW(32)) u_spi (
    .sclk, .cs_n, .mosi, .miso, .wr_en, .addr, .wdata, .rdata);

  reg_bank u_regs (
    .clk(sclk), .rst_n, .wr_en, .addr, .wdata, .rdata, .cfg, .sts);

  // ---------------- recording channels ----------------
  logic [N_CH-1:0]          q, sw, sw_int, dvalid;
  logic [ADC_BITS-1:0]      code [N_CH];
  logic [N_CH*ADC_BITS-1:0] words;

  for (genvar c = 0; c < N_CH; c++) begin : g_ch
    afe_channel u_afe (
      .clk, .vin_uv(vin_uv[c]), .rstc, .rsti, .rstf, .fch, .sw(sw[c]), .q(q[c]));

    rec_channel_dig #(.CNT_BITS(CNT_BITS)) u_dig (
      .clk, .rst_n, .q(q[c]), .rstc, .conv_last, .per_rst,
      .sw_ext(cfg.sw_ext[c]), .sw_sel(cfg.ctrl.sw_sel),
      .dout(code[c]), .dout_valid(dvalid[c]), .sw(sw[c]), .sw_int(sw_int[c]));

    assign words[c*ADC_BITS +: ADC_BITS] = code[c];
  end

  // ---------------- serializers, DDR output, feature extraction ----------------
  localparam int unsigned HW = CH_PER_HALF * ADC_BITS;

  logic [1:0]          ser_d, ser_sync, fe_v, fvalid;
  logic [4:0]          fe_ch [2];
  logic [ADC_BITS-1:0] fe_word [2];
  feu_cfg_t            fcfg [2];

  assign fcfg[0] = cfg.feu0;
  assign fcfg[1] = cfg.feu1;

  for (genvar h = 0; h < 2; h++) begin : g_half
    data_serializer #(.N_CH(CH_PER_HALF), .W(ADC_BITS)) u_ser (
      .clk, .rst_n, .words(words[h*HW +: HW]), .frame_start(dvalid[0]),
      .en(cfg.ctrl.ser_en),
      .d(ser_d[h]), .sync(ser_sync[h]), .fe_word(fe_word[h]),
      .fe_ch(fe_ch[h]), .fe_valid(fe_v[h]));

    feu #(.N_BANDS(N_BANDS), .WIN_LOG2(WIN_LOG2)) u_feu (
      .clk, .rst_n, .en(cfg.ctrl.feu_en), .cfg(fcfg[h]),
      .word(fe_word[h]), .ch(fe_ch[h]), .valid(fe_v[h]),
      .plv(plv[h]), .pac(pac[h]), .feat_valid(fvalid[h]));
  end

  ddr_mux u_ddr (.sclk(clk), .da(ser_d[0]), .db(ser_d[1]), .dout);

  assign sync = ser_sync[0];

  // ---------------- status and monitor pin ----------------
  logic [15:0] frame_cnt;
  logic [6:0]  n_art;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) frame_cnt <= '0;
    else if (dvalid[0]) frame_cnt <= frame_cnt + 1'b1;
  end

  always_comb begin
    n_art = '0;
    for (int c = 0; c < N_CH; c++) n_art = n_art + 7'(sw_int[c]);
  end

  assign sts = '{plv0: plv[0], pac0: pac[0], plv1: plv[1], pac1: pac[1],
                 status: {9'd0, n_art, frame_cnt}};

  always_comb begin
    unique case (cfg.ctrl.feout_sel)
      4'd0:    feout = conv_last;
      4'd1:    feout = sync;
      4'd2:    feout = fvalid[0];
      4'd3:    feout = fvalid[1];
      4'd4:    feout = |sw_int;
      4'd5:    feout = q[0];
      default: feout = 1'b0;
    endcase
  end

  initial assert (CONV_LEN >= CH_PER_HALF * (ADC_BITS + 1) + 8)
    else $error("erec: a conversion must be longer than a serializer frame");
endmodule
