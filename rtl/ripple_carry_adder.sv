// ripple_carry_adder: WIDTH-bit adder built as a chain of full_adder cells,
// as in the original design (eight full adders for the 8-bit operands).
//
// Besides the sum and the carry out of the top stage it brings out the carry
// into the top stage (c_msb), from which the status logic forms the overflow
// bit V = cout ^ c_msb. Combinational; the carry ripples through all WIDTH
// stages.
module ripple_carry_adder #(
  parameter int unsigned WIDTH = 8
) (
  input  logic [WIDTH-1:0] x,
  input  logic [WIDTH-1:0] y,
  input  logic             cin,
  output logic [WIDTH-1:0] s,
  output logic             cout,
  output logic             c_msb
);
  logic [WIDTH:0] c;

  assign c[0] = cin;

  for (genvar i = 0; i < WIDTH; i++) begin : g_stage
    full_adder u_fa (
      .x   (x[i]),
      .y   (y[i]),
      .cin (c[i]),
      .s   (s[i]),
      .cout(c[i+1])
    );
  end

  assign cout  = c[WIDTH];
  assign c_msb = c[WIDTH-1];
endmodule
