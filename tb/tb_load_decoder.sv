// tb_load_decoder: exhaustive check of the 2-to-4 load decoder with enable.
module tb_load_decoder;
  logic [1:0] sel;
  logic en;
  logic [3:0] load;
  int checks = 0, failures = 0;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  load_decoder dut (.sel(sel), .en(en), .load(load));

  initial begin
    for (int i = 0; i < 8; i++) begin
      logic [3:0] exp;
      {en, sel} = 3'(i);
      #1;
      exp = en ? (4'b0001 << sel) : 4'b0000;
      checks++;
      if (load != exp) begin
        failures++;
        $display("FAIL en=%0b sel=%0d: got %b exp %b", en, sel, load, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
