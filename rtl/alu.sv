// alu: one integer functional unit of a processing element.
//
// Each PE has PE_W (four) of them, so a PE can execute four operations per
// cycle and the four PEs together sixteen. The unit is combinational; the
// PE registers its output, so a result is broadcast one cycle after issue.
// Operations: add, subtract, and, or, xor, set-less-than (signed), shift
// left and shift right logical (shift amount = low five bits of b), and add
// immediate (b carries the sign-extended immediate).
//
// The document names functional units but does not describe them; the
// operation set is this design's choice.
module alu
  import cmp_pkg::*;
(
  input  op_e   op,
  input  word_t a,
  input  word_t b,
  output word_t y
);

  always_comb begin
    unique case (op)
      OP_ADD, OP_ADDI: y = a + b;
      OP_SUB:          y = a - b;
      OP_AND:          y = a & b;
      OP_OR:           y = a | b;
      OP_XOR:          y = a ^ b;
      OP_SLT:          y = word_t'($signed(a) < $signed(b));
      OP_SLL:          y = a << b[4:0];
      OP_SRL:          y = a >> b[4:0];
      default:         y = '0;
    endcase
  end

endmodule
