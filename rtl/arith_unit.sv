// arith_unit: the arithmetic functional block of the function unit.
//
// Six operations share one ripple carry adder: add (0000), subAB (0001),
// A+2 (0010), -A (0011), mova (1010) and -B (1011). A 4-to-6 decoder turns the
// function select code into one enable per operation; the enables steer two
// operand-select muxes in front of the adder:
//   X input : A (add, subAB, A+2, mova), ~A (-A), 0 (-B)
//   Y input : B (add), ~B (subAB, -B), 0 (-A, mova), 2 (A+2)
// The carry-in is the last bit of the code, as in the original design, whose
// arithmetic codes end in 1 exactly when the operation needs a carry-in of 1.
// Which adder input takes the operand for -A and -B is this design's choice;
// it gives three choices on every X bit and on seven Y bits and four on Y
// bit 1, the mux mix the original block was built from.
//
// Combinational. Outputs the sum, the carry out of the top bit and the carry
// into the top bit for the status logic. For codes outside the block the
// output is don't-care; the function unit's output mux discards it.
module arith_unit
  import fu_pkg::*;
(
  input  word_t      a,
  input  word_t      b,
  input  logic [3:0] fsel,
  output word_t      y,
  output logic       cout,
  output logic       c_msb
);
  // 4-to-6 operation decoder
  logic en_add, en_sub, en_inc2, en_nega, en_mova, en_negb;

  always_comb begin
    en_add  = (fsel == OP_ADD);
    en_sub  = (fsel == OP_SUB);
    en_inc2 = (fsel == OP_INC2);
    en_nega = (fsel == OP_NEGA);
    en_mova = (fsel == OP_MOVA);
    en_negb = (fsel == OP_NEGB);
  end

  // Operand-select muxes (AND-OR form, one-hot enables)
  word_t x_in, y_in;

  always_comb begin
    x_in = ({DATA_W{en_add | en_sub | en_inc2 | en_mova}} & a)
         | ({DATA_W{en_nega}} & ~a);
    y_in = ({DATA_W{en_add}} & b)
         | ({DATA_W{en_sub | en_negb}} & ~b)
         | ({DATA_W{en_inc2}} & word_t'(2));
  end

  ripple_carry_adder #(.WIDTH(DATA_W)) u_rca (
    .x    (x_in),
    .y    (y_in),
    .cin  (fsel[0]),
    .s    (y),
    .cout (cout),
    .c_msb(c_msb)
  );
endmodule
