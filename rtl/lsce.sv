// lsce - magnitude of a complex number, alpha-max-plus-beta-min.
//
// |z| ~ alpha*max(|I|,|Q|) + beta*min(|I|,|Q|) with alpha = 15/16 and
// beta = 15/32, built from shifts and adds only; the error is within
// about -6.3% to +4.8% of the true magnitude. Using an alpha-max/beta-min
// estimator here follows the back-end diagram; the constants are the usual
// ones and this design's choice.
//
// Interface: signed W-bit I and Q in, unsigned W-bit magnitude out
// (|I|,|Q| <= 2^(W-1) keeps the result below 2^W). Combinational.
module lsce #(
  parameter int unsigned W = 17
) (
  input  logic signed [W-1:0] i_in,
  input  logic signed [W-1:0] q_in,
  output logic        [W-1:0] mag
);
  logic [W-1:0] ai, aq, mx, mn;
  logic [W+1:0] sum;

  always_comb begin
    ai  = i_in[W-1] ? W'(-i_in) : W'(i_in);
    aq  = q_in[W-1] ? W'(-q_in) : W'(q_in);
    mx  = (ai > aq) ? ai : aq;
    mn  = (ai > aq) ? aq : ai;
    sum = (W+2)'(mx) - (W+2)'(mx >> 4) + (W+2)'(mn >> 1) - (W+2)'(mn >> 5);
    mag = (sum > (W+2)'({W{1'b1}})) ? '1 : W'(sum);
  end
endmodule
