// fu_ref_pkg: behavioural reference of the function unit for the testbenches.
//
// Each operation is computed from its arithmetic meaning with integer
// arithmetic (sums, signed ranges, the % operator), not from the gate-level
// structure used in the RTL, so the two can be compared. Returns
// {V,C,N,Z, result}.
package fu_ref_pkg;

  function automatic logic [11:0] fu_ref(input logic [7:0] a, input logic [7:0] b,
                                         input logic [3:0] f);
    int sa, sb, full, sres;
    logic [7:0] r;
    logic v, c;
    sa = int'($signed(a));
    sb = int'($signed(b));
    v = 1'b0;
    c = 1'b0;
    r = 8'h00;
    case (f)
      4'b0000: begin full = int'(a) + int'(b); r = full[7:0]; c = full > 255;
                     sres = sa + sb; v = (sres > 127) || (sres < -128); end
      4'b0001: begin full = int'(a) - int'(b); r = full[7:0]; c = int'(a) >= int'(b);
                     sres = sa - sb; v = (sres > 127) || (sres < -128); end
      4'b0010: begin full = int'(a) + 2; r = full[7:0]; c = full > 255;
                     sres = sa + 2; v = sres > 127; end
      4'b0011: begin full = -sa; r = full[7:0]; c = (a == 8'h00); v = (a == 8'h80); end
      4'b0100: r = a & b;
      4'b0101: r = ~b;
      4'b0110: r = ~a;
      4'b0111: r = ~(a & b);
      4'b1001: r = ~(a | b);
      4'b1010: r = a;
      4'b1011: begin full = -sb; r = full[7:0]; c = (b == 8'h00); v = (b == 8'h80); end
      4'b1101: begin sres = sb % 4; r = sres[7:0]; end
      4'b1110: begin full = int'(b) * 8; r = full[7:0]; end
      default: r = 8'h00;
    endcase
    return {v, c, r[7], (r == 8'h00), r};
  endfunction

  function automatic bit is_arith(input logic [3:0] f);
    return f inside {4'b0000, 4'b0001, 4'b0010, 4'b0011, 4'b1010, 4'b1011};
  endfunction

endpackage
