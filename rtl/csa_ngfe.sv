// csa_ngfe: WIDTH-bit carry select adder built from two NGFE ripple carry adders.
//
// The adder does not wait for the carry-in to ripple through the operand bits.
// Two ripple carry adders work on the same operands at once: rca_for_cin0 with
// its carry-in tied to 0 and rca_for_cin1 with its carry-in tied to 1. When the
// real carry-in arrives it only has to steer WIDTH+1 2:1 multiplexers, one per
// sum bit (for_s0 .. for_s<WIDTH-1>) and one for the carry-out (for_cout).
// The path from cin to the outputs is therefore a single multiplexer.
// This is the top of the design: it contains every other module.
//
// Interface:
//   a, b      WIDTH-bit operands         cin   carry-in (multiplexer select)
//   sum       WIDTH-bit sum              cout  carry-out
//   garbage0  garbage outputs of the carry-in-0 adder
//   garbage1  garbage outputs of the carry-in-1 adder
//             (layout as in rca_ngfe)
//
// Timing: purely combinational. The default WIDTH of 4 (two adders of twelve
// reversible gates each plus five multiplexers) is the published size.
// Bringing the garbage outputs out as ports is this design's choice.
module csa_ngfe
  import ngfe_pkg::*;
#(
  parameter int unsigned WIDTH = ADDER_WIDTH
) (
  input  logic [WIDTH-1:0]            a,
  input  logic [WIDTH-1:0]            b,
  input  logic                        cin,
  output logic [WIDTH-1:0]            sum,
  output logic                        cout,
  output logic [WIDTH*FA_GARBAGE-1:0] garbage0,
  output logic [WIDTH*FA_GARBAGE-1:0] garbage1
);

  logic [WIDTH-1:0] sum0, sum1;
  logic             cout0, cout1;

  rca_ngfe #(.WIDTH(WIDTH)) rca_for_cin0 (
    .a(a), .b(b), .cin(1'b0),
    .sum(sum0), .cout(cout0), .garbage(garbage0)
  );

  rca_ngfe #(.WIDTH(WIDTH)) rca_for_cin1 (
    .a(a), .b(b), .cin(1'b1),
    .sum(sum1), .cout(cout1), .garbage(garbage1)
  );

  for (genvar i = 0; i < WIDTH; i++) begin : for_s
    mux2x1 mux (.i0(sum0[i]), .i1(sum1[i]), .sel(cin), .y(sum[i]));
  end

  mux2x1 for_cout (.i0(cout0), .i1(cout1), .sel(cin), .y(cout));

endmodule
