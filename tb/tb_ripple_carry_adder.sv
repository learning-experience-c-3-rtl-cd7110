// tb_ripple_carry_adder: checks the 8-bit ripple carry adder on corner values
// and random operands. Sum and carry out are compared with the integer sum;
// the carry into the MSB is checked through the signed-overflow identity
// (cout ^ c_msb) == signed result out of range.
module tb_ripple_carry_adder;
  logic [7:0] x, y, s;
  logic cin, cout, c_msb;
  int checks = 0, failures = 0;

  ripple_carry_adder #(.WIDTH(8)) dut (.x(x), .y(y), .cin(cin), .s(s), .cout(cout), .c_msb(c_msb));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    int full, sfull;
    logic ovf;
    #1;
    full  = int'(x) + int'(y) + int'(cin);
    sfull = int'($signed(x)) + int'($signed(y)) + int'(cin);
    ovf   = (sfull > 127) || (sfull < -128);
    checks++;
    if ({cout, s} != 9'(full) || (cout ^ c_msb) != ovf) begin
      failures++;
      $display("FAIL %h + %h + %0b: got %0b %h c_msb=%0b", x, y, cin, cout, s, c_msb);
    end
  endtask

  initial begin
    static logic [7:0] corner [6] = '{8'h00, 8'h01, 8'h7F, 8'h80, 8'hFE, 8'hFF};
    foreach (corner[i]) foreach (corner[j]) for (int c = 0; c < 2; c++) begin
      x = corner[i]; y = corner[j]; cin = c[0];
      check();
    end
    repeat (2000) begin
      x = 8'($urandom); y = 8'($urandom); cin = 1'($urandom);
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
