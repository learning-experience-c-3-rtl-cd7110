// tb_status_logic: checks N, Z, C and V for random and corner results, with
// and without the arithmetic block selected.
module tb_status_logic;
  import fu_pkg::*;
  logic [7:0] result;
  logic arith_sel, cout, c_msb;
  vcnz_t vcnz;
  int checks = 0, failures = 0;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  status_logic dut (.result(result), .arith_sel(arith_sel), .cout(cout), .c_msb(c_msb), .vcnz(vcnz));

  initial begin
    for (int i = 0; i < 600; i++) begin
      logic [3:0] exp;
      result = (i < 8) ? 8'h00 : (i < 16) ? 8'h80 : 8'($urandom);
      {arith_sel, cout, c_msb} = 3'(i);
      #1;
      exp[0] = (result == 8'h00);
      exp[1] = result >= 8'h80;
      exp[2] = arith_sel ? cout : 1'b0;
      exp[3] = arith_sel ? (cout != c_msb) : 1'b0;
      checks++;
      if (vcnz != exp) begin
        failures++;
        $display("FAIL r=%h a=%0b co=%0b cm=%0b: got %b exp %b", result, arith_sel, cout, c_msb, vcnz, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
