// complex_signal_extractor - multi-rate band splitting with complex output.
//
// A cascade of N_BANDS stages, each a lowpass filter with decimation by two
// (lpf_dec2) whose output feeds both the next stage and a Hoda wavelet
// (hoda_wavelet). Stage k therefore runs at fs/2^(k+1) and its wavelet
// picks out the octave band centred at fs/2^(k+3) as a complex signal
// (I, Q). With fs = 1 kS/s and 6 bands the centres are 125, 62.5, 31, 16,
// 7.8 and 3.9 Hz. The ADC code (0..1023) is made signed by subtracting
// mid-scale.
//
// The LPF / 2-down / wavelet chain follows the back-end diagram; the number
// of bands and all word widths are this design's own.
//
// Timing: one sample per in_valid. Band k's outputs are registered, hold
// their value between updates, and band_valid[k] pulses when they change,
// k+2 cycles after the input sample that completed the decimation.
module complex_signal_extractor
  import erec_pkg::*;
#(
  parameter int unsigned N_BANDS = 6,
  parameter int unsigned L       = 8
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic [ADC_BITS-1:0]      x,
  output logic signed [CPX_W-1:0]  band_i [N_BANDS],
  output logic signed [CPX_W-1:0]  band_q [N_BANDS],
  output logic [N_BANDS-1:0]       band_valid
);
  logic signed [SMP_W-1:0] stage_x [N_BANDS+1];
  logic [N_BANDS:0]        stage_v;

  assign stage_x[0] = SMP_W'($signed({1'b0, x}) - $signed(12'(1 << (ADC_BITS - 1))));
  assign stage_v[0] = in_valid;

  for (genvar k = 0; k < N_BANDS; k++) begin : g_band
    lpf_dec2 #(.DW(SMP_W)) u_lpf (
      .clk, .rst_n,
      .in_valid (stage_v[k]),   .x (stage_x[k]),
      .out_valid(stage_v[k+1]), .y (stage_x[k+1]));

    hoda_wavelet #(.L(L), .DW(SMP_W)) u_wav (
      .clk, .rst_n,
      .in_valid (stage_v[k+1]), .x (stage_x[k+1]),
      .out_valid(band_valid[k]),
      .i_out    (band_i[k]),    .q_out(band_q[k]));
  end
endmodule
