// function_unit_and_bus: a minimal register-transfer datapath, an 8-bit
// function unit closed in a loop with four 8-bit registers.
//
// The slide switches set everything:
//   SW[9:8] register on operand bus A     SW[5:2] function select code
//   SW[7:6] register on operand bus B     SW[1:0] destination register
// and SW[9:2] together are also the 8-bit value loaded by KEY[0].
// Pressing KEY[0] stores SW[9:2] into the destination register; pressing
// KEY[1] stores the function unit's result there. The function unit is
// combinational, so result and {V,C,N,Z} follow the switches and registers
// directly; a register changes two clock edges after a press reaches the
// first synchroniser stage (see register_transfer_system).
// The structure and the switch assignment follow the original design; the
// reset input and the button synchroniser are this design's additions.
module function_unit_and_bus
  import fu_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic [1:0]         key_n,
  input  logic [9:0]         sw,
  output word_t [NREGS-1:0]  regs,
  output word_t              operand_a,
  output word_t              operand_b,
  output word_t              result,
  output vcnz_t              vcnz
);
  register_transfer_system u_rts (
    .clk      (clk),
    .rst_n    (rst_n),
    .key_n    (key_n),
    .sw       (sw),
    .fu_result(result),
    .regs     (regs),
    .operand_a(operand_a),
    .operand_b(operand_b)
  );

  function_unit u_fu (
    .a     (operand_a),
    .b     (operand_b),
    .fsel  (sw[5:2]),
    .result(result),
    .vcnz  (vcnz)
  );
endmodule
