// fu_pkg: types and constants shared by the 8-bit function unit and the
// register transfer system.
//
// The function select code is four bits wide. Thirteen of the sixteen codes
// name an operation; 1000, 1100 and 1111 are unused and produce a zero result.
// The code table is the one used by the original design (its recorded
// simulation pairs each code with an operation). fsel[3:1] alone decides which
// of the three functional blocks (arithmetic, logic, shifting) produces the
// result, and for arithmetic codes fsel[0] is the adder's carry-in.
package fu_pkg;

  localparam int unsigned DATA_W = 8;   // operand, result and register width
  localparam int unsigned NREGS  = 4;   // registers in the register transfer system

  typedef logic [DATA_W-1:0] word_t;

  typedef enum logic [3:0] {
    OP_ADD  = 4'b0000,  // A + B
    OP_SUB  = 4'b0001,  // A - B      (A + ~B + 1)
    OP_INC2 = 4'b0010,  // A + 2
    OP_NEGA = 4'b0011,  // -A         (~A + 0 + 1)
    OP_AND  = 4'b0100,  // A & B
    OP_NOTB = 4'b0101,  // ~B
    OP_NOTA = 4'b0110,  // ~A
    OP_NAND = 4'b0111,  // ~(A & B)
    OP_NU8  = 4'b1000,  // unused, result 0
    OP_NOR  = 4'b1001,  // ~(A | B)
    OP_MOVA = 4'b1010,  // A          (A + 0 + 0)
    OP_NEGB = 4'b1011,  // -B         (0 + ~B + 1)
    OP_NUC  = 4'b1100,  // unused, result 0
    OP_REM4 = 4'b1101,  // B rem 4, signed, truncating toward zero
    OP_MUL8 = 4'b1110,  // B * 8      (B << 3)
    OP_NUF  = 4'b1111   // unused, result 0
  } fsel_e;

  // One-hot block select produced from fsel[3:1].
  typedef struct packed {
    logic shift;
    logic logic_;
    logic arith;
  } unit_sel_t;

  // Status bits in the order the design presents them.
  typedef struct packed {
    logic v;  // signed overflow (arithmetic block only)
    logic c;  // carry out (arithmetic block only)
    logic n;  // result MSB
    logic z;  // result is zero
  } vcnz_t;

endpackage
