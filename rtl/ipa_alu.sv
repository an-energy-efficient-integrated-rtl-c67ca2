// ipa_alu: the 32-bit arithmetic/logic unit of an IPA processing element.
//
// Purely combinational. It computes add, subtract, the bitwise operations,
// shifts (by IN1[4:0]), a signed 16 x 16 -> 32 multiply of the low halves of
// the two operands, a move of IN0, and the compares LT, LTU, EQ, NE and GE.
// A compare gives 0 or 1 as its result and raises is_cmp so the PE loads
// `cond` into its condition register (CR). For LD the unit forms the address
// IN0 + IN1. Other opcodes give 0.
//
// The 32-bit width and the 16-bit multiplier come from the architecture; the
// operation list beyond add, multiply, subtract, OR, AND and less-than, and the
// signed multiply, are choices of this implementation.
module ipa_alu
  import ipa_pkg::*;
(
  input  opcode_e           op,
  input  logic [DATA_W-1:0] a,
  input  logic [DATA_W-1:0] b,
  output logic [DATA_W-1:0] result,
  output logic              cond,
  output logic              is_cmp
);
  logic signed [31:0] prod;
  assign prod = $signed(a[15:0]) * $signed(b[15:0]);

  always_comb begin
    cond   = 1'b0;
    is_cmp = 1'b0;
    unique case (op)
      OP_LT:  begin is_cmp = 1'b1; cond = $signed(a) <  $signed(b); end
      OP_LTU: begin is_cmp = 1'b1; cond = a < b; end
      OP_EQ:  begin is_cmp = 1'b1; cond = a == b; end
      OP_NE:  begin is_cmp = 1'b1; cond = a != b; end
      OP_GE:  begin is_cmp = 1'b1; cond = $signed(a) >= $signed(b); end
      default: ;
    endcase
  end

  always_comb begin
    unique case (op)
      OP_ADD, OP_LD: result = a + b;
      OP_SUB:        result = a - b;
      OP_MUL:        result = prod;
      OP_AND:        result = a & b;
      OP_OR:         result = a | b;
      OP_XOR:        result = a ^ b;
      OP_SLL:        result = a << b[4:0];
      OP_SRL:        result = a >> b[4:0];
      OP_SRA:        result = $signed(a) >>> b[4:0];
      OP_MOV:        result = a;
      OP_LT, OP_LTU, OP_EQ, OP_NE, OP_GE: result = {31'd0, cond};
      default:       result = '0;
    endcase
  end
endmodule
