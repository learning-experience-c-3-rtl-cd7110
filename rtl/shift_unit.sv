// shift_unit: the shifting functional block of the function unit.
//
// Two operations on operand B:
//   mult8 (1110): B * 8, i.e. B shifted left by three places (bits shifted out
//                 are lost).
//   rem4  (1101): signed remainder of B divided by 4, truncating toward zero,
//                 so the result has the sign of B (e.g. -86 rem 4 = -2).
// rem4 is formed the way the original block's parts suggest, with a ripple
// carry adder and eight XOR gates: the low two bits of |B| are
// m = {B[1] ^ (B[7] & B[0]), B[0]}, and the result is the conditional two's
// complement (m ^ {8{B[7]}}) + B[7]. A 4-to-2 decoder enables one of the two
// and a 2x1 AND-OR mux per bit selects; codes outside the block give 0 (the
// unused codes 1100 and 1111 fall in this block's range). Combinational.
module shift_unit
  import fu_pkg::*;
(
  input  word_t      b,
  input  logic [3:0] fsel,
  output word_t      y
);
  logic  en_rem4, en_mul8;
  logic  sgn;
  word_t mag_low, rem_x, rem_sum, mul_res;
  logic  rem_cout, rem_cmsb;

  always_comb begin
    en_rem4 = (fsel == OP_REM4);
    en_mul8 = (fsel == OP_MUL8);

    sgn     = b[DATA_W-1];
    mag_low = '0;
    mag_low[0] = b[0];
    mag_low[1] = b[1] ^ (sgn & b[0]);
    rem_x   = mag_low ^ {DATA_W{sgn}};

    mul_res = {b[DATA_W-4:0], 3'b000};
  end

  ripple_carry_adder #(.WIDTH(DATA_W)) u_rca (
    .x    (rem_x),
    .y    ('0),
    .cin  (sgn),
    .s    (rem_sum),
    .cout (rem_cout),
    .c_msb(rem_cmsb)
  );

  // rem_cout / rem_cmsb are not used: the status bits C and V come only from
  // the arithmetic block.
  always_comb begin
    y = ({DATA_W{en_rem4}} & rem_sum)
      | ({DATA_W{en_mul8}} & mul_res);
  end
endmodule
