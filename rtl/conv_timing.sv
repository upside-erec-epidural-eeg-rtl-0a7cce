// conv_timing - conversion sequencer shared by all recording channels.
//
// Each incremental-ADC conversion lasts CONV_CYCLES cycles of the 512 kHz
// modulator clock; 512 cycles give one result per channel per millisecond,
// the Nyquist rate of the 500 Hz signal band. A free-running cycle counter
// marks cycle 0 (rstc/rsti/rstf high: the integrating capacitor, the OTA
// and the feedback IDAC are reset and the channel counters clear) and the
// last cycle (conv_last: the comparator decision is taken as the LSB and
// every channel latches its 10-bit result). fch is the chopper clock of the
// front-end OTA, clk divided by FCH_DIV.
//
// The 512 kHz clock and the reset/chopper signal names follow the channel
// diagram; the conversion length, the one-cycle reset pulses and the
// chopper division are this design's own choices.
//
// Periodic bias reset: with per_en high, per_rst is high during the last
// conversion of every per_period conversions (per_period = 1000 gives the
// 1 Hz periodic reset of the input bias network at 1 kS/s); the channels
// then close their bias switches for the following conversion. The 1 Hz
// figure follows the bias-network simulation; the mechanism is this
// design's own.
//
// Timing: outputs are registered; rstc is high in cycle 0, conv_last in
// cycle CONV_CYCLES-1; the first conversion starts in the cycle after reset.
module conv_timing #(
  parameter int unsigned CONV_CYCLES = 512,
  parameter int unsigned FCH_DIV     = 4     // even, >= 2
) (
  input  logic clk,
  input  logic rst_n,
  output logic rstc,
  output logic rsti,
  output logic rstf,
  output logic fch,
  output logic conv_last,
  output logic [$clog2(CONV_CYCLES)-1:0] cycle,
  input  logic        per_en,
  input  logic [15:0] per_period,
  output logic        per_rst
);
  localparam int unsigned CW = $clog2(CONV_CYCLES);
  localparam int unsigned DW = (FCH_DIV > 2) ? $clog2(FCH_DIV / 2) : 1;
  localparam logic [CW-1:0] LAST = CW'(CONV_CYCLES - 1);

  logic [DW-1:0] fdiv;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) cycle <= '0;
    else if (cycle == LAST) cycle <= '0;
    else cycle <= cycle + 1'b1;
  end

  always_comb begin
    rstc      = (cycle == '0);
    rsti      = rstc;
    rstf      = rstc;
    conv_last = (cycle == LAST);
  end

  // periodic bias reset: conversion counter
  logic [15:0] conv_cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) conv_cnt <= '0;
    else if (conv_last) begin
      if (!per_en || conv_cnt + 16'd1 >= per_period) conv_cnt <= '0;
      else conv_cnt <= conv_cnt + 1'b1;
    end
  end

  assign per_rst = per_en && (conv_cnt + 16'd1 >= per_period);

  // chopper clock: toggles every FCH_DIV/2 cycles
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fdiv <= '0;
      fch  <= 1'b0;
    end else if (fdiv == DW'(FCH_DIV / 2 - 1)) begin
      fdiv <= '0;
      fch  <= ~fch;
    end else begin
      fdiv <= fdiv + 1'b1;
    end
  end

  initial assert (CONV_CYCLES >= 4 && FCH_DIV >= 2 && FCH_DIV % 2 == 0)
    else $error("conv_timing: bad parameters");
endmodule
