// feynman_gate: the 2-input, 2-output reversible Feynman gate (controlled NOT).
//
// Outputs, with inputs a (control) and b (target):
//   p = a
//   q = a ^ b
// Applying the gate twice returns the inputs, so it is its own inverse. In the
// NGFE full adder it merges the two partial carry terms into the carry-out.
//
// Purely combinational; no clock and no state. The adder design names this
// gate; its equations are the standard definition of the Feynman gate.
module feynman_gate (
  input  logic a,
  input  logic b,
  output logic p,
  output logic q
);

  always_comb begin
    p = a;
    q = a ^ b;
  end

endmodule
