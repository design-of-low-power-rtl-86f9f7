// fa_ngfe: reversible full adder built from two New Gates and one Feynman gate.
//
// How it works:
//   ng1 (New Gate, third input tied to 0): w = a & b, x = a ^ b
//   ng2 (New Gate, inputs c, x, 0):        y = c & (a ^ b), r = a ^ b ^ c
//   fe2 (Feynman gate, inputs y, w):       u = y ^ w = a&b ^ c&(a^b)
// so r is the sum and u the carry-out, matching sum = a ^ b ^ c and
// carry = ab + bc + ca. The two product terms a&b and c&(a^b) are never both 1,
// so the exclusive-or in the Feynman gate equals their OR.
//
// Interface (port names as in the published schematic):
//   a, b  operand bits      c  carry-in
//   r     sum               u  carry-out
//   p, q, s, t  garbage outputs: p = a, q = c, s = a ^ b, t = c & (a ^ b)
// Which schematic output carries which garbage signal is this design's reading
// of the schematic; the sum and carry functions are fixed by the full adder
// equations. Three gate instances, as in the published instance count.
//
// Timing: purely combinational. The critical path is ng1 -> ng2 -> fe2 for the
// carry and ng1 -> ng2 for the sum.
module fa_ngfe (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r,
  output logic s,
  output logic t,
  output logic u
);

  logic ab;       // ng1.q: a & b
  logic a_x_b;    // ng1.r: a ^ b
  logic c_and_x;  // ng2.q: c & (a ^ b)
  logic ng1_p;
  logic ng2_p;

  new_gate ng1 (
    .a(a), .b(b), .c(1'b0),
    .p(ng1_p), .q(ab), .r(a_x_b)
  );

  new_gate ng2 (
    .a(c), .b(a_x_b), .c(1'b0),
    .p(ng2_p), .q(c_and_x), .r(r)
  );

  feynman_gate fe2 (
    .a(c_and_x), .b(ab),
    .p(t), .q(u)
  );

  assign p = ng1_p;
  assign q = ng2_p;
  assign s = a_x_b;

endmodule
