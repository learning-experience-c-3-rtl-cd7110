// tb_logic_unit: checks the five logic operations against the reference on
// random operands, and that every other code gives 0.
module tb_logic_unit;
  import fu_ref_pkg::*;
  logic [7:0] a, b, y;
  logic [3:0] fsel;
  int checks = 0, failures = 0;

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic_unit dut (.a(a), .b(b), .fsel(fsel), .y(y));

  initial begin
    for (int f = 0; f < 16; f++) begin
      fsel = 4'(f);
      repeat (300) begin
        logic [7:0] exp;
        a = 8'($urandom); b = 8'($urandom);
        #1;
        exp = (fsel inside {4'b0100, 4'b0101, 4'b0110, 4'b0111, 4'b1001}) ? 8'(fu_ref(a, b, fsel))
              : 8'h00;
        checks++;
        if (y != exp) begin
          failures++;
          $display("FAIL f=%b a=%h b=%h: got %h exp %h", fsel, a, b, y, exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
