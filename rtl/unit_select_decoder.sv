// unit_select_decoder: 3-to-3 decoder choosing which functional block drives
// the function unit's result.
//
// It looks only at the top three bits of the function select code, fsel[3:1]:
//   000, 001, 101 -> arithmetic block
//   010, 011, 100 -> logic block
//   110, 111      -> shifting block
// The mapping follows from the code table (each block's codes share these
// values of fsel[3:1] and no two blocks do). Exactly one output is high for
// every input. Combinational.
module unit_select_decoder
  import fu_pkg::*;
(
  input  logic [2:0] fsel_hi,
  output unit_sel_t  sel
);
  always_comb begin
    sel.arith  = (fsel_hi == 3'b000) | (fsel_hi == 3'b001) | (fsel_hi == 3'b101);
    sel.logic_ = (fsel_hi == 3'b010) | (fsel_hi == 3'b011) | (fsel_hi == 3'b100);
    sel.shift  = (fsel_hi == 3'b110) | (fsel_hi == 3'b111);
  end
endmodule
