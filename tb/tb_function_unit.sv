// tb_function_unit: checks result and {V,C,N,Z} of the function unit for all
// sixteen codes on corner and random operands against the integer reference,
// and replays the twenty operand/code combinations recorded for the original
// design with their recorded results and status bits.
module tb_function_unit;
  import fu_pkg::*;
  import fu_ref_pkg::*;
  word_t a, b, result;
  logic [3:0] fsel;
  vcnz_t vcnz;
  int checks = 0, failures = 0;

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function_unit dut (.a(a), .b(b), .fsel(fsel), .result(result), .vcnz(vcnz));

  task automatic check(input logic [11:0] exp);
    checks++;
    if ({vcnz, result} != exp) begin
      failures++;
      $display("FAIL f=%b a=%h b=%h: got %b %h exp %b %h", fsel, a, b, vcnz, result,
               exp[11:8], exp[7:0]);
    end
  endtask

  // {A, B, code, VCNZ, result} as recorded
  typedef struct packed {
    logic [7:0] a;
    logic [7:0] b;
    logic [3:0] f;
    logic [3:0] vcnz;
    logic [7:0] r;
  } vec_t;

  localparam vec_t REC [20] = '{
    '{8'h00, 8'h00, 4'b0001, 4'b0101, 8'h00}, '{8'h91, 8'h00, 4'b0111, 4'b0010, 8'hFF},
    '{8'h37, 8'h00, 4'b0100, 4'b0001, 8'h00}, '{8'h00, 8'h91, 4'b0100, 4'b0001, 8'h00},
    '{8'hC4, 8'h91, 4'b0000, 4'b1100, 8'h55}, '{8'hC4, 8'hC4, 4'b0001, 4'b0101, 8'h00},
    '{8'h55, 8'h55, 4'b0110, 4'b0010, 8'hAA}, '{8'h64, 8'h55, 4'b1010, 4'b0000, 8'h64},
    '{8'h55, 8'hAA, 4'b1101, 4'b0010, 8'hFE}, '{8'h55, 8'hAA, 4'b1110, 4'b0000, 8'h50},
    '{8'h50, 8'hAA, 4'b0111, 4'b0010, 8'hFF}, '{8'h64, 8'h17, 4'b1000, 4'b0001, 8'h00},
    '{8'hE8, 8'h17, 4'b1001, 4'b0001, 8'h00}, '{8'hE8, 8'h00, 4'b0011, 4'b0000, 8'h18},
    '{8'h00, 8'h17, 4'b1011, 4'b0010, 8'hE9}, '{8'h64, 8'h00, 4'b0010, 4'b0000, 8'h66},
    '{8'h18, 8'hE9, 4'b0111, 4'b0010, 8'hF7}, '{8'h18, 8'hE9, 4'b0100, 4'b0000, 8'h08},
    '{8'h00, 8'h08, 4'b0101, 4'b0010, 8'hF7}, '{8'h00, 8'h00, 4'b0000, 4'b0001, 8'h00}
  };

  initial begin
    static word_t corner [7] = '{8'h00, 8'h01, 8'h02, 8'h7F, 8'h80, 8'hFE, 8'hFF};
    foreach (REC[i]) begin
      a = REC[i].a; b = REC[i].b; fsel = REC[i].f;
      #1;
      check({REC[i].vcnz, REC[i].r});
    end
    for (int f = 0; f < 16; f++) begin
      fsel = 4'(f);
      foreach (corner[i]) foreach (corner[j]) begin
        a = corner[i]; b = corner[j];
        #1;
        check(fu_ref(a, b, fsel));
      end
      repeat (500) begin
        a = 8'($urandom); b = 8'($urandom);
        #1;
        check(fu_ref(a, b, fsel));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
