// logic_unit: the logic functional block of the function unit.
//
// Five bitwise operations: AND (0100), notB (0101), notA (0110), NAND (0111)
// and NOR (1001). A 4-to-5 decoder makes one enable per operation and a
// five-input AND-OR mux per bit picks the matching gate output. When the code
// names no logic operation every enable is low and the output is 0 (this is
// how the unused code 1000, which falls in this block's range, yields 0).
// Combinational.
module logic_unit
  import fu_pkg::*;
(
  input  word_t      a,
  input  word_t      b,
  input  logic [3:0] fsel,
  output word_t      y
);
  logic en_and, en_notb, en_nota, en_nand, en_nor;

  always_comb begin
    en_and  = (fsel == OP_AND);
    en_notb = (fsel == OP_NOTB);
    en_nota = (fsel == OP_NOTA);
    en_nand = (fsel == OP_NAND);
    en_nor  = (fsel == OP_NOR);

    y = ({DATA_W{en_and }} &  (a & b))
      | ({DATA_W{en_notb}} &  ~b)
      | ({DATA_W{en_nota}} &  ~a)
      | ({DATA_W{en_nand}} & ~(a & b))
      | ({DATA_W{en_nor }} & ~(a | b));
  end
endmodule
