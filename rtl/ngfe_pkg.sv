// ngfe_pkg: constants shared by the NGFE (New Gate + Feynman gate) adder modules.
//
// Each reversible full adder has six outputs: the sum, the carry and four
// garbage outputs that carry no part of the result but keep the gate network
// reversible. The ripple carry and carry select adders bring these garbage
// outputs out as ports, so their widths are derived from the constant below.
package ngfe_pkg;

  // Garbage outputs of one NGFE full adder: p, q, s and t in fa_ngfe.
  localparam int unsigned FA_GARBAGE = 4;

  // Adder width of the ripple carry and carry select adders.
  localparam int unsigned ADDER_WIDTH = 4;

endpackage
