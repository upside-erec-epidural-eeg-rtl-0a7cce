// feu - feature-extraction unit for one half of the array (32 channels).
//
// Receives the result of every channel of its half once per conversion,
// through the serializer's channel mux (one channel per cycle, with its
// number). Every channel has its own complex signal extractor (octave
// bands, complex output), so band signals of all 32 channels are kept up to
// date. The PLV/PAC unit then compares the phase of band plv_band in
// channels ch_a and ch_b (PLV) and couples the phase of band pac_lo with the
// amplitude of band pac_hi, both of channel ch_a (PAC). Bands and channels
// come from the unit's configuration register.
//
// The extractor + PLV/PAC structure and feature extraction for every
// channel follow the back-end description; the single PLV/PAC unit per half
// and the channel/band selection by register are this design's own.
//
// Timing: a sample of channel c is taken when valid is high and ch == c.
// The PLV/PAC unit is ticked N_BANDS+3 cycles after the sample of the last
// channel, when every band has settled; plv/pac update with feat_valid
// every 2^WIN_LOG2 conversions.
module feu
  import erec_pkg::*;
#(
  parameter int unsigned N_FE_CH     = CH_PER_HALF,
  parameter int unsigned N_BANDS  = 6,
  parameter int unsigned WIN_LOG2 = 10
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    en,
  input  feu_cfg_t                cfg,
  input  logic [ADC_BITS-1:0]     word,
  input  logic [$clog2(N_FE_CH)-1:0] ch,
  input  logic                    valid,
  output logic [15:0]             plv,
  output logic [31:0]             pac,
  output logic                    feat_valid
);
  localparam int unsigned CW = $clog2(N_FE_CH);

  logic signed [CPX_W-1:0] zi [N_FE_CH][N_BANDS];
  logic signed [CPX_W-1:0] zq [N_FE_CH][N_BANDS];
  logic [N_BANDS-1:0]      zv [N_FE_CH];
  logic [N_BANDS+2:0]      dly;
  logic                    pp_busy;

  for (genvar c = 0; c < N_FE_CH; c++) begin : g_cse
    complex_signal_extractor #(.N_BANDS(N_BANDS)) u_cse (
      .clk, .rst_n, .in_valid(en && valid && ch == CW'(c)), .x(word),
      .band_i(zi[c]), .band_q(zq[c]), .band_valid(zv[c]));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) dly <= '0;
    else        dly <= {dly[N_BANDS+1:0], en && valid && ch == CW'(N_FE_CH - 1)};
  end

  // band selection; an index beyond the last band selects the last band,
  // a channel index beyond the last channel the last channel
  function automatic int unsigned bsel(input logic [2:0] b);
    return (int'(b) < N_BANDS) ? int'(b) : N_BANDS - 1;
  endfunction
  function automatic int unsigned csel(input logic [4:0] c);
    return (int'(c) < N_FE_CH) ? int'(c) : N_FE_CH - 1;
  endfunction

  plv_pac_unit #(.WIN_LOG2(WIN_LOG2)) u_pp (
    .clk, .rst_n, .tick(dly[N_BANDS+2]),
    .za_i(zi[csel(cfg.ch_a)][bsel(cfg.plv_band)]), .za_q(zq[csel(cfg.ch_a)][bsel(cfg.plv_band)]),
    .zb_i(zi[csel(cfg.ch_b)][bsel(cfg.plv_band)]), .zb_q(zq[csel(cfg.ch_b)][bsel(cfg.plv_band)]),
    .zl_i(zi[csel(cfg.ch_a)][bsel(cfg.pac_lo)]),   .zl_q(zq[csel(cfg.ch_a)][bsel(cfg.pac_lo)]),
    .zh_i(zi[csel(cfg.ch_a)][bsel(cfg.pac_hi)]),   .zh_q(zq[csel(cfg.ch_a)][bsel(cfg.pac_hi)]),
    .plv, .pac, .feat_valid, .busy(pp_busy));
endmodule
