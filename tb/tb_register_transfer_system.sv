// tb_register_transfer_system: drives button presses into the register
// transfer system, with a function-unit result that changes every clock, and
// checks against a model of four registers:
//  * a KEY[0] press stores SW[9:2], a KEY[1] press stores the result,
//    into the register named by SW[1:0];
//  * the store happens exactly two clock edges after the press is first
//    sampled (synchroniser plus press detection) and only once per press,
//    however long the button is held;
//  * the operand buses show the registers named by SW[9:8] and SW[7:6].
module tb_register_transfer_system;
  import fu_pkg::*;
  logic clk, rst_n;
  logic [1:0] key_n;
  logic [9:0] sw;
  word_t fu_result;
  word_t [3:0] regs, model;
  word_t operand_a, operand_b;
  int checks = 0, failures = 0;
  int n_sw_loads = 0, n_fu_loads = 0, n_both = 0;

  initial clk = 1'b0;
  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  register_transfer_system dut (
    .clk(clk), .rst_n(rst_n), .key_n(key_n), .sw(sw), .fu_result(fu_result),
    .regs(regs), .operand_a(operand_a), .operand_b(operand_b));

  // result input changes every clock so that a repeated load would show
  always @(posedge clk) fu_result <= 8'($urandom);

  task automatic check_regs(input string what);
    checks++;
    if (regs != model) begin
      failures++;
      $display("FAIL %s: regs %h exp %h", what, regs, model);
    end
  endtask

  task automatic check_buses();
    checks++;
    if (operand_a != model[sw[9:8]] || operand_b != model[sw[7:6]]) begin
      failures++;
      $display("FAIL buses: a=%h b=%h exp %h %h", operand_a, operand_b,
               model[sw[9:8]], model[sw[7:6]]);
    end
  endtask

  // Press key(s) for 'hold' cycles. Inputs change just after a falling edge.
  task automatic press(input logic [1:0] keys_pressed, input int hold);
    word_t expv;
    @(negedge clk);
    key_n = ~keys_pressed;
    @(posedge clk);              // edge k: first sample
    @(negedge clk);
    check_regs("before load");
    expv = keys_pressed[0] ? sw[9:2] : fu_result;   // value presented at edge k+2
    @(posedge clk);              // edge k+1
    @(negedge clk);
    expv = keys_pressed[0] ? sw[9:2] : fu_result;
    check_regs("one edge after press");
    @(posedge clk);              // edge k+2: load
    @(negedge clk);
    model[sw[1:0]] = expv;
    check_regs("load");
    repeat (hold) begin
      @(negedge clk);
      check_regs("held");
    end
    key_n = 2'b11;
    repeat (4) @(negedge clk);
    check_regs("after release");
    check_buses();
  endtask

  initial begin
    rst_n = 1'b0;
    key_n = 2'b11;
    sw = '0;
    model = '0;
    #22;
    rst_n = 1'b1;
    @(negedge clk);
    check_regs("reset");
    // loads from the switches into every register
    for (int r = 0; r < 4; r++) begin
      sw = {8'($urandom), 2'(r)};
      press(2'b01, 1 + r);
      n_sw_loads++;
    end
    repeat (60) begin
      int kind;
      kind = $urandom_range(0, 9);
      sw = 10'($urandom);
      if (kind < 4) begin press(2'b01, $urandom_range(0, 6)); n_sw_loads++; end
      else if (kind < 9) begin press(2'b10, $urandom_range(0, 6)); n_fu_loads++; end
      else begin press(2'b11, 2); n_both++; end
    end
    if (n_sw_loads == 0 || n_fu_loads == 0 || n_both == 0) failures++;
    $display("switch loads=%0d result loads=%0d both-button presses=%0d", n_sw_loads, n_fu_loads, n_both);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
