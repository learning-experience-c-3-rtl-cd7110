// tb_operand_mux: random register contents, every select value; the output
// must equal the selected register.
module tb_operand_mux;
  import fu_pkg::*;
  word_t [3:0] regs;
  logic [1:0] sel;
  word_t y;
  int checks = 0, failures = 0;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  operand_mux dut (.regs(regs), .sel(sel), .y(y));

  initial begin
    repeat (200) begin
      for (int i = 0; i < 4; i++) regs[i] = 8'($urandom);
      for (int s = 0; s < 4; s++) begin
        sel = 2'(s);
        #1;
        checks++;
        if (y != regs[s]) begin
          failures++;
          $display("FAIL sel=%0d: got %h exp %h", s, y, regs[s]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
