// status_logic: the four status bits of the function unit.
//
//   N = MSB of the result
//   Z = NOR of all result bits
//   C = carry out of the arithmetic block's adder
//   V = carry out XOR carry into the MSB (signed overflow)
// C and V pass through a mux that forces them to 0 unless the arithmetic block
// is selected; that logic and shift operations leave C and V at 0 is this
// design's reading of the original results. Combinational.
module status_logic
  import fu_pkg::*;
(
  input  word_t  result,
  input  logic   arith_sel,
  input  logic   cout,
  input  logic   c_msb,
  output vcnz_t  vcnz
);
  always_comb begin
    vcnz.n = result[DATA_W-1];
    vcnz.z = ~(|result);
    vcnz.c = arith_sel & cout;
    vcnz.v = arith_sel & (cout ^ c_msb);
  end
endmodule
