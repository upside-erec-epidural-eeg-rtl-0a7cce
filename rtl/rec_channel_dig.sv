// rec_channel_dig - digital part of one recording channel.
//
// The channel is a first-order incremental delta-sigma ADC: the comparator
// output q is counted by a 9-bit up-counter during a conversion, and the
// result D_out is the counter value as the 9 MSBs with the comparator's
// last decision as the LSB (10 bits). A small piece of logic watches the
// count: a conversion whose count lies within ART_MARGIN of either rail is
// treated as an artifact (the input is saturated), and sw_int is raised
// for the whole next conversion so that the input bias switches pull the
// AC-coupled inputs back to the bias voltage. A mux lets the register bank
// override the switches (sw_ext when sw_sel is 1). A periodic reset
// request (per_rst, sampled with conv_last) also raises sw_int for the
// next conversion.
//
// The counter, its width, the MSB/LSB split, the 10-bit result and the
// sw_int/sw_ext mux follow the channel diagram. The conversion framing, the
// saturation rule of the logic and the select of the mux are this design's
// own choices.
//
// Timing (driven by conv_timing): cycle 0 rstc clears the counter; q is
// counted in cycles 1..N-2; in the last cycle (conv_last) D_out <= {count,
// q} and dout_valid pulses one cycle later together with the new D_out.
module rec_channel_dig #(
  parameter int unsigned CNT_BITS   = 9,
  parameter int unsigned ART_MARGIN = 4
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                q,
  input  logic                rstc,
  input  logic                conv_last,
  input  logic                per_rst,
  input  logic                sw_ext,
  input  logic                sw_sel,
  output logic [CNT_BITS:0]   dout,
  output logic                dout_valid,
  output logic                sw,
  output logic                sw_int
);
  localparam logic [CNT_BITS-1:0] CMAX = '1;

  logic [CNT_BITS-1:0] cnt;
  logic                saturated;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) cnt <= '0;
    else if (rstc) cnt <= '0;
    else if (!conv_last && q && cnt != CMAX) cnt <= cnt + 1'b1;
  end

  assign saturated = (cnt <= CNT_BITS'(ART_MARGIN)) ||
                     (cnt >= CMAX - CNT_BITS'(ART_MARGIN));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dout       <= '0;
      dout_valid <= 1'b0;
      sw_int     <= 1'b0;
    end else begin
      dout_valid <= conv_last;
      if (conv_last) begin
        dout   <= {cnt, q};
        sw_int <= saturated || per_rst;
      end
    end
  end

  assign sw = sw_sel ? sw_ext : sw_int;
endmodule
