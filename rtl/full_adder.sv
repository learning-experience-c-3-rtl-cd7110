// full_adder: one-bit full adder, the cell of the ripple carry adders used by
// the arithmetic and shifting blocks.
//
// Purely combinational: s = x ^ y ^ cin, cout = majority(x, y, cin). The
// original cell is a NAND-only network of 56 transistors; here it is written
// as its two Boolean equations, which is this design's choice.
module full_adder (
  input  logic x,
  input  logic y,
  input  logic cin,
  output logic s,
  output logic cout
);
  always_comb begin
    s    = x ^ y ^ cin;
    cout = (x & y) | (x & cin) | (y & cin);
  end
endmodule
