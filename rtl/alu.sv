// alu: one-cycle integer ALU of one issue slot (EX stage).
//
// Purely combinational: result = a <op> b, produced in the same cycle the operation
// sits in EX, so the result is ready in the EX/MEM register for the EX/EX forwarding
// path. One-cycle ALUs in EX follow the design description; the operation set
// (add/sub/logic/shifts/multiply-low/compare) is this design's own choice, sized to
// run code such as the DCT fragment the description shows (shr, sub, add, mul).
// Shifts use b[4:0]; SHR is arithmetic, SHRU logical; MUL returns the low 32 bits;
// compares return 0 or 1.
module alu
  import vliw_pkg::*;
(
  input  alu_op_t op,
  input  word_t   a,
  input  word_t   b,
  output word_t   y
);
  always_comb begin
    unique case (op)
      ALU_ADD:   y = a + b;
      ALU_SUB:   y = a - b;
      ALU_AND:   y = a & b;
      ALU_OR:    y = a | b;
      ALU_XOR:   y = a ^ b;
      ALU_SHL:   y = a << b[4:0];
      ALU_SHR:   y = word_t'($signed(a) >>> b[4:0]);
      ALU_SHRU:  y = a >> b[4:0];
      ALU_MUL:   y = a * b;
      ALU_CMPEQ: y = word_t'(a == b);
      ALU_CMPLT: y = word_t'($signed(a) < $signed(b));
      default:   y = '0;
    endcase
  end
endmodule
