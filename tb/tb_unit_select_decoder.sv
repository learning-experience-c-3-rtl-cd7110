// tb_unit_select_decoder: for every fsel[3:1] value, checks that exactly one
// block is selected and that it is the block owning the codes with those bits
// (taken from the reference's list of arithmetic, logic and shift codes).
module tb_unit_select_decoder;
  import fu_pkg::*;
  import fu_ref_pkg::*;
  logic [2:0] fsel_hi;
  unit_sel_t sel;
  int checks = 0, failures = 0;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  unit_select_decoder dut (.fsel_hi(fsel_hi), .sel(sel));

  initial begin
    for (int i = 0; i < 8; i++) begin
      logic [2:0] exp;
      logic [3:0] f0, f1;
      fsel_hi = 3'(i);
      f0 = {fsel_hi, 1'b0};
      f1 = {fsel_hi, 1'b1};
      #1;
      if (is_arith(f0) || is_arith(f1))                          exp = 3'b001;
      else if (f0 inside {4'b1100, 4'b1101, 4'b1110, 4'b1111})   exp = 3'b100;
      else                                                       exp = 3'b010;
      checks++;
      if (sel != exp) begin
        failures++;
        $display("FAIL fsel_hi=%b: got %b exp %b", fsel_hi, sel, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
