// register_transfer_system: four 8-bit registers with two read buses and one
// write path.
//
// Write path: a 2x1 mux chooses the data to store, the switch value SW[9:2]
// while KEY[0] is pressed or the function unit result while KEY[1] is
// pressed, and a 2-to-4 load decoder driven by SW[1:0] enables the
// destination register. Read path: two operand_mux instances put the register
// chosen by SW[9:8] on operand bus A and the one chosen by SW[7:6] on operand
// bus B. These follow the original design.
//
// Choices of this design (the original does not spell them out):
//  * The buttons (active low) pass through a two-flip-flop synchroniser, and a
//    register loads once per press: on the clock edge after the synchronised
//    button is first seen low. Holding a button therefore does not re-apply an
//    operation whose destination is also one of its sources.
//  * If both buttons are first seen pressed in the same cycle the switch data
//    is stored.
//  * rst_n (active low, asynchronous) clears all registers to 0.
// Timing: with KEY set up before clock edge k, the register holds the new
// value after edge k+2. The operand buses are combinational from the
// registers and the switches.
module register_transfer_system
  import fu_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic [1:0]         key_n,
  input  logic [9:0]         sw,
  input  word_t              fu_result,
  output word_t [NREGS-1:0]  regs,
  output word_t              operand_a,
  output word_t              operand_b
);
  // Button synchroniser and press detection
  logic [1:0] key_meta_n, key_sync_n, pressed_q;
  logic [1:0] press_evt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      key_meta_n <= 2'b11;
      key_sync_n <= 2'b11;
      pressed_q  <= 2'b00;
    end else begin
      key_meta_n <= key_n;
      key_sync_n <= key_meta_n;
      pressed_q  <= ~key_sync_n;
    end
  end

  assign press_evt = ~key_sync_n & ~pressed_q;

  // 2x1 input mux: switches on KEY[0], function unit result on KEY[1]
  word_t wdata;
  assign wdata = press_evt[0] ? word_t'(sw[9:2]) : fu_result;

  // Load decoder
  logic [NREGS-1:0] load;

  load_decoder u_load_dec (
    .sel (sw[1:0]),
    .en  (|press_evt),
    .load(load)
  );

  // The four registers
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      regs <= '0;
    end else begin
      for (int i = 0; i < NREGS; i++) begin
        if (load[i]) regs[i] <= wdata;
      end
    end
  end

  // Operand buses
  operand_mux u_mux_a (
    .regs(regs),
    .sel (sw[9:8]),
    .y   (operand_a)
  );

  operand_mux u_mux_b (
    .regs(regs),
    .sel (sw[7:6]),
    .y   (operand_b)
  );
endmodule
