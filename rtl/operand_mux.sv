// operand_mux: selects which of the four registers drives an operand bus.
//
// A 2-to-4 decoder turns sel into four one-hot enables, and each bit of the
// bus is a 4x1 AND-OR mux over the same bit of the four registers, the
// structure of the original design (one such 4x1 mux per bit per bus).
// Combinational.
module operand_mux
  import fu_pkg::*;
(
  input  word_t [NREGS-1:0] regs,
  input  logic  [1:0]       sel,
  output word_t             y
);
  logic [3:0] dec;

  always_comb begin
    dec[0] = ~sel[1] & ~sel[0];
    dec[1] = ~sel[1] &  sel[0];
    dec[2] =  sel[1] & ~sel[0];
    dec[3] =  sel[1] &  sel[0];

    y = ({DATA_W{dec[0]}} & regs[0])
      | ({DATA_W{dec[1]}} & regs[1])
      | ({DATA_W{dec[2]}} & regs[2])
      | ({DATA_W{dec[3]}} & regs[3]);
  end
endmodule
