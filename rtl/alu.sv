// alu: the single ALU of the execute stage.
//
// Combinational. a is the top of the stack (A) and b the element under it
// (B) at the moment the ALU instruction executes. The results follow the
// ALU instructions: or, xor, and, add, sub (-A + B), and the shifts, whose
// distance is A[4:0]: ushr is the logical right shift of B, shr the
// arithmetic right shift and shl the left shift. The multiplier is a
// separate two-cycle unit in the execute stage; for mul this unit returns
// the product handed in on mul_p. Unknown codes return 0.
module alu
  import jp_pkg::*;
(
  input  mcode_t op,
  input  word_t  a,
  input  word_t  b,
  input  word_t  mul_p,
  output word_t  y
);
  always_comb begin
    unique case (op)
      AOR:     y = a | b;
      AXOR:    y = a ^ b;
      AAND:    y = a & b;
      AADD:    y = a + b;
      ASUB:    y = b - a;
      AMUL:    y = mul_p;
      AUSHR:   y = b >> a[4:0];
      ASHR:    y = word_t'($signed(b) >>> a[4:0]);
      ASHL:    y = b << a[4:0];
      default: y = '0;
    endcase
  end
endmodule
