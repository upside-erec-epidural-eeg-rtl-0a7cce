// hoda_wavelet - multiplier-less complex wavelet.
//
// Gives the complex (analytic) representation of the band around a quarter
// of the input sample rate. The wavelet is a complex exponential at fs/4
// under an L-sample rectangular window: h[m] = j^m, so every coefficient of
// the real and imaginary parts is 0, +1 or -1 and the filter needs only
// additions and subtractions:
//   I[n] = x[n] - x[n-2] + x[n-4] - x[n-6] ...
//   Q[n] = x[n-1] - x[n-3] + x[n-5] - x[n-7] ...
// For a tone at fs/4 the output rotates by 90 degrees per sample with a
// constant magnitude of L/2 times the tone amplitude; the mirror frequency
// -fs/4 is cancelled exactly (L even). Placing a multiplier-less wavelet
// after each lowpass/decimation stage follows the back-end diagram; the
// coefficients are this design's own.
//
// Timing: x is taken when in_valid is high; i_out/q_out/out_valid are
// registered and follow one cycle later, one output per input.
module hoda_wavelet #(
  parameter int unsigned L  = 8,    // even, >= 2
  parameter int unsigned DW = 14
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  input  logic signed [DW-1:0]   x,
  output logic                   out_valid,
  output logic signed [DW+2:0]   i_out,
  output logic signed [DW+2:0]   q_out
);
  localparam int unsigned OW = DW + 3;

  logic signed [DW-1:0] tap [L];     // tap[0] newest after the shift
  logic signed [OW-1:0] si, sq;

  // sums over the window including the incoming sample
  always_comb begin
    si = OW'(x);
    sq = '0;
    for (int m = 1; m < L; m++) begin
      case (m % 4)
        0: si = si + OW'(tap[m-1]);
        1: sq = sq + OW'(tap[m-1]);
        2: si = si - OW'(tap[m-1]);
        default: sq = sq - OW'(tap[m-1]);
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int m = 0; m < L; m++) tap[m] <= '0;
      i_out     <= '0;
      q_out     <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        tap[0] <= x;
        for (int m = 1; m < L; m++) tap[m] <= tap[m-1];
        i_out <= si;
        q_out <= sq;
      end
    end
  end

  initial assert (L >= 2 && L % 2 == 0) else $error("hoda_wavelet: L must be even");
endmodule
