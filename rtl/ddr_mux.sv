// ddr_mux - double-data-rate output multiplexer.
//
// Merges the two serializer lines da and db into one line running at twice
// their bit rate. da is sampled by a flip-flop on the falling edge of sclk,
// db by one on the rising edge, and a 2:1 mux driven by sclk itself passes
// the da register while sclk is high and the db register while it is low.
// Each register is selected only during the half period in which it does
// not load, so dout never switches with a loading register.
//
// The two opposite-edge flip-flops and the clock-driven 2:1 mux follow the
// DDR diagram; which mux input goes with which clock level is this
// design's choice.
//
// Timing: a bit of da appears on dout during the high phase after the
// falling edge that sampled it; a bit of db during the low phase after the
// rising edge that sampled it.
module ddr_mux (
  input  logic sclk,
  input  logic da,
  input  logic db,
  output logic dout
);
  logic qa, qb;

  always_ff @(negedge sclk) qa <= da;
  always_ff @(posedge sclk) qb <= db;

  assign dout = sclk ? qa : qb;
endmodule
