// mux2x1: 2:1 multiplexer used by the carry select adder to pick a result.
//
// y = i1 when sel is 1, otherwise i0. In the carry select adder sel is the
// carry-in, i0 the result precomputed for carry-in 0 and i1 the result for
// carry-in 1. The adder design uses one such multiplexer per sum bit and one
// for the carry-out; its implementation as a plain combinational select is this
// design's choice. Purely combinational.
module mux2x1 (
  input  logic i0,
  input  logic i1,
  input  logic sel,
  output logic y
);

  always_comb y = sel ? i1 : i0;

endmodule
