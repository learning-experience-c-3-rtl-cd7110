// function_unit: 8-bit function unit with thirteen operations and four status
// bits.
//
// Operands A and B go to three functional blocks in parallel (arithmetic,
// logic, shifting), each of which decodes the full 4-bit function select code
// for its own operations. A 3-to-3 decoder on fsel[3:1] picks the block, and
// a 3x1 AND-OR mux per result bit passes that block's output. The status
// logic forms {V,C,N,Z} from the result and the arithmetic block's carries.
// Codes (see fu_pkg): 0000 add, 0001 A-B, 0010 A+2, 0011 -A, 0100 AND,
// 0101 notB, 0110 notA, 0111 NAND, 1001 NOR, 1010 mova, 1011 -B, 1101 rem4,
// 1110 mult8; 1000, 1100 and 1111 give result 0 (so Z = 1).
// Purely combinational: result and status settle one propagation delay after
// the operands or the code change.
module function_unit
  import fu_pkg::*;
(
  input  word_t      a,
  input  word_t      b,
  input  logic [3:0] fsel,
  output word_t      result,
  output vcnz_t      vcnz
);
  word_t     arith_y, logic_y, shift_y;
  logic      cout, c_msb;
  unit_sel_t sel;

  arith_unit u_arith (
    .a    (a),
    .b    (b),
    .fsel (fsel),
    .y    (arith_y),
    .cout (cout),
    .c_msb(c_msb)
  );

  logic_unit u_logic (
    .a   (a),
    .b   (b),
    .fsel(fsel),
    .y   (logic_y)
  );

  shift_unit u_shift (
    .b   (b),
    .fsel(fsel),
    .y   (shift_y)
  );

  unit_select_decoder u_sel (
    .fsel_hi(fsel[3:1]),
    .sel    (sel)
  );

  // 3x1 output mux, one per bit
  always_comb begin
    result = ({DATA_W{sel.arith }} & arith_y)
           | ({DATA_W{sel.logic_}} & logic_y)
           | ({DATA_W{sel.shift }} & shift_y);
  end

  status_logic u_status (
    .result   (result),
    .arith_sel(sel.arith),
    .cout     (cout),
    .c_msb    (c_msb),
    .vcnz     (vcnz)
  );
endmodule
