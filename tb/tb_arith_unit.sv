// tb_arith_unit: checks the six arithmetic operations against the integer
// reference (fu_ref_pkg) on corner and random operands: sum, carry out (C) and
// carry out XOR carry into the MSB (V).
module tb_arith_unit;
  import fu_ref_pkg::*;
  logic [7:0] a, b, y;
  logic [3:0] fsel;
  logic cout, c_msb;
  int checks = 0, failures = 0;

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  arith_unit dut (.a(a), .b(b), .fsel(fsel), .y(y), .cout(cout), .c_msb(c_msb));

  task automatic check();
    logic [11:0] exp;
    #1;
    exp = fu_ref(a, b, fsel);
    checks++;
    if (y != exp[7:0] || cout != exp[10] || (cout ^ c_msb) != exp[11]) begin
      failures++;
      $display("FAIL f=%b a=%h b=%h: got y=%h c=%0b v=%0b exp %h c=%0b v=%0b",
               fsel, a, b, y, cout, cout ^ c_msb, exp[7:0], exp[10], exp[11]);
    end
  endtask

  initial begin
    static logic [3:0] ops [6] = '{4'b0000, 4'b0001, 4'b0010, 4'b0011, 4'b1010, 4'b1011};
    static logic [7:0] corner [7] = '{8'h00, 8'h01, 8'h02, 8'h7F, 8'h80, 8'hFE, 8'hFF};
    foreach (ops[k]) begin
      fsel = ops[k];
      foreach (corner[i]) foreach (corner[j]) begin
        a = corner[i]; b = corner[j];
        check();
      end
      repeat (1000) begin
        a = 8'($urandom); b = 8'($urandom);
        check();
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
