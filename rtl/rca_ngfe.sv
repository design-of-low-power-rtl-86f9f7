// rca_ngfe: WIDTH-bit ripple carry adder built from NGFE reversible full adders.
//
// Stage i adds a[i], b[i] and the carry c[i]; its carry-out becomes c[i+1],
// the carry-in of stage i+1. c[0] is cin and c[WIDTH] is cout. The carry ripples
// through every stage, so the delay grows linearly with WIDTH. The default
// WIDTH of 4 (four full adders, twelve reversible gates) is the published size.
//
// Interface:
//   a, b     WIDTH-bit operands          cin   carry-in
//   sum      WIDTH-bit sum               cout  carry-out
//   garbage  the four garbage outputs of every stage, stage i in
//            garbage[i*FA_GARBAGE +: FA_GARBAGE] as {t, s, q, p}
//
// Timing: purely combinational. Bringing the garbage outputs out as a port is
// this design's choice; they hold no part of the result.
module rca_ngfe
  import ngfe_pkg::*;
#(
  parameter int unsigned WIDTH = ADDER_WIDTH
) (
  input  logic [WIDTH-1:0]            a,
  input  logic [WIDTH-1:0]            b,
  input  logic                        cin,
  output logic [WIDTH-1:0]            sum,
  output logic                        cout,
  output logic [WIDTH*FA_GARBAGE-1:0] garbage
);

  logic [WIDTH:0] c;

  assign c[0] = cin;

  for (genvar i = 0; i < WIDTH; i++) begin : g_stage
    fa_ngfe fa (
      .a(a[i]),
      .b(b[i]),
      .c(c[i]),
      .p(garbage[i*FA_GARBAGE + 0]),
      .q(garbage[i*FA_GARBAGE + 1]),
      .r(sum[i]),
      .s(garbage[i*FA_GARBAGE + 2]),
      .t(garbage[i*FA_GARBAGE + 3]),
      .u(c[i+1])
    );
  end

  assign cout = c[WIDTH];

endmodule
