// afe_channel - behavioural model of the analog recording channel.
//
// This is a behavioural model, not synthesizable logic: it stands for the
// AC-coupled input, the switchable input bias network, the chopped OTA, the
// integrating capacitor, the clocked comparator and the feedback IDAC of one
// channel. Together they form a first-order incremental delta-sigma
// modulator: on every rising clk edge the integrator adds the normalised
// input u in [0,1] and subtracts the previous decision q, and q is the sign
// of the integrator. Over a conversion the number of ones in q is u times
// the number of cycles.
//
// u = 0.5 + vin/(2*FS_UV), clipped to [0,1]: a +/-FS_UV microvolt input
// spans the code range (full scale +/-2 mV, read from the channel
// simulation that maps a 2 mV sine onto nearly the whole 10-bit range).
// The AC coupling is modelled by a slow DC tracker (time constant
// HP_CYCLES clocks) that is subtracted from the input; while sw is high the
// bias switches are closed and the tracker is set to the present input,
// which removes a DC step or artifact at once. Noise, chopping artefacts
// and OTA non-idealities are not modelled; fch, rsti and rstf only have to
// be present.
//
// Timing: rstc high at a rising edge clears the integrator and q.
module afe_channel #(
  parameter real FS_UV     = 2000.0,
  parameter real HP_CYCLES = 1.0e6
) (
  input  logic clk,
  input  real  vin_uv,
  input  logic rstc,
  input  logic rsti,
  input  logic rstf,
  input  logic fch,
  input  logic sw,
  output logic q
);
  real integ;   // integrator state (Cint)
  real dc;      // DC level removed by the AC coupling

  initial begin
    integ = 0.0;
    dc    = 0.0;
    q     = 1'b0;
  end

  // fch (ideal chopping) has no effect on the modelled signal
  always @(posedge clk) begin : modulator
    real u, dc_n, integ_n;
    dc_n = sw ? vin_uv : dc + (vin_uv - dc) / HP_CYCLES;
    u = 0.5 + (vin_uv - dc_n) / (2.0 * FS_UV);
    if (u > 1.0) u = 1.0;
    if (u < 0.0) u = 0.0;
    integ_n = integ + u - (q ? 1.0 : 0.0);
    dc <= dc_n;
    if (rstc || rsti || rstf) begin
      integ <= 0.0;
      q     <= 1'b0;
    end else begin
      integ <= integ_n;
      q     <= (integ_n >= 0.0);
    end
  end
endmodule
