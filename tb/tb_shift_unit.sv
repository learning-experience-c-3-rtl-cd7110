// tb_shift_unit: checks mult8 and rem4 for all 256 values of B against
// B*8 mod 256 and the signed % operator, and that every other code gives 0.
module tb_shift_unit;
  import fu_ref_pkg::*;
  logic [7:0] b, y;
  logic [3:0] fsel;
  int checks = 0, failures = 0;

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  shift_unit dut (.b(b), .fsel(fsel), .y(y));

  initial begin
    for (int f = 0; f < 16; f++) begin
      fsel = 4'(f);
      for (int v = 0; v < 256; v++) begin
        logic [7:0] exp;
        b = 8'(v);
        #1;
        exp = (fsel inside {4'b1101, 4'b1110}) ? 8'(fu_ref(8'h00, b, fsel)) : 8'h00;
        checks++;
        if (y != exp) begin
          failures++;
          $display("FAIL f=%b b=%h: got %h exp %h", fsel, b, y, exp);
        end
      end
    end
    // the value recorded for the original design: rem4 of AA is FE
    fsel = 4'b1101; b = 8'hAA; #1;
    checks++;
    if (y != 8'hFE) begin failures++; $display("FAIL rem4(AA)=%h", y); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
