// new_gate: the 3-input, 3-output reversible "New Gate" (NG).
//
// Outputs, with inputs a, b, c:
//   p = a
//   q = (a & b) ^ c
//   r = (~a & ~c) ^ ~b
// The mapping is a bijection on the eight input vectors, so the inputs can be
// recovered from the outputs. With c tied to 0 the gate gives q = a & b and
// r = a ^ b, which is how the NGFE full adder uses it.
//
// Purely combinational; no clock and no state. The adder design names this gate
// and shows where it is wired; the output equations are the standard
// definition of the New Gate from the reversible-logic literature.
module new_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);

  always_comb begin
    p = a;
    q = (a & b) ^ c;
    r = (~a & ~c) ^ ~b;
  end

endmodule
