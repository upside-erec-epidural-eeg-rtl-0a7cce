// lpf_dec2 - half-band lowpass filter and decimation by two.
//
// One stage of the multi-rate lowpass bank of the complex signal
// extractor. The filter is the three-tap binomial [1 2 1]/4, which has a
// zero at half the input rate and needs only shifts and adds; it is
// evaluated for every second input sample, so the output rate is half the
// input rate and the DC gain is one. The lowpass-then-decimate structure
// follows the back-end diagram; the taps are this design's choice.
//
// Timing: x is taken when in_valid is high. y and out_valid are registered
// and update in the cycle after every second accepted sample (the 2nd, 4th,
// ... after reset).
module lpf_dec2 #(
  parameter int unsigned DW = 14
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [DW-1:0] x,
  output logic                 out_valid,
  output logic signed [DW-1:0] y
);
  logic signed [DW-1:0] x1, x2;
  logic                 odd;
  logic signed [DW+1:0] acc;

  assign acc = (DW+2)'(x) + ((DW+2)'(x1) <<< 1) + (DW+2)'(x2);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x1 <= '0;
      x2 <= '0;
      odd <= 1'b0;
      y <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        x1  <= x;
        x2  <= x1;
        odd <= ~odd;
        if (odd) begin
          y         <= DW'(acc >>> 2);
          out_valid <= 1'b1;
        end
      end
    end
  end
endmodule
