// word_mux - N:1 multiplexer of W-bit words.
//
// Used twice in each serializer: as the 320:10 mux that picks one of 32
// channel results (N=32, W=10) and as the 10:1 mux that picks one bit of
// that result (N=10, W=1). din holds word k in bits [k*W +: W]. An index
// at or beyond N gives zero. Purely combinational.
module word_mux #(
  parameter int unsigned N = 32,
  parameter int unsigned W = 10
) (
  input  logic [N*W-1:0]               din,
  input  logic [$clog2(N)-1:0]         sel,
  output logic [W-1:0]                 dout
);
  always_comb begin
    dout = '0;
    for (int unsigned k = 0; k < N; k++)
      if (sel == ($clog2(N))'(k)) dout = din[k*W +: W];
  end
endmodule
