// tb_full_adder: exhaustive check of the one-bit full adder against the
// integer sum x + y + cin.
module tb_full_adder;
  logic x, y, cin, s, cout;
  int checks = 0, failures = 0;

  full_adder dut (.x(x), .y(y), .cin(cin), .s(s), .cout(cout));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      int sum;
      {x, y, cin} = 3'(i);
      #1;
      sum = int'(x) + int'(y) + int'(cin);
      checks++;
      if ({cout, s} != 2'(sum)) begin
        failures++;
        $display("FAIL x=%0b y=%0b cin=%0b got %0b%0b", x, y, cin, cout, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
