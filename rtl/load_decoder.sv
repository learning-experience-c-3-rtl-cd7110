// load_decoder: 2-to-4 decoder with enable that produces the load signal of
// each of the four registers.
//
// sel is the destination register number (switches SW[1:0]); when en is high
// exactly load[sel] is high, otherwise all four are low. Combinational.
module load_decoder (
  input  logic [1:0] sel,
  input  logic       en,
  output logic [3:0] load
);
  always_comb begin
    load[0] = en & ~sel[1] & ~sel[0];
    load[1] = en & ~sel[1] &  sel[0];
    load[2] = en &  sel[1] & ~sel[0];
    load[3] = en &  sel[1] &  sel[0];
  end
endmodule
