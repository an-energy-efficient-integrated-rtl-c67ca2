// tb_ipa_alu: self-checking test of the PE arithmetic/logic unit.
// Drives random operands through every opcode and compares result, condition
// bit and compare flag with a reference computed here.
`timescale 1ns/1ps
module tb_ipa_alu;
  import ipa_pkg::*;
  opcode_e op;
  logic [31:0] a, b, result;
  logic cond, is_cmp;
  int checks = 0, failures = 0;

  ipa_alu dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [32:0] ref_model(input opcode_e o, input logic [31:0] x, input logic [31:0] y);
    logic c;
    c = 1'b0;
    case (o)
      OP_ADD, OP_LD: return {1'b0, x + y};
      OP_SUB: return {1'b0, x - y};
      OP_MUL: return {1'b0, 32'($signed({{16{x[15]}}, x[15:0]}) * $signed({{16{y[15]}}, y[15:0]}))};
      OP_AND: return {1'b0, x & y};
      OP_OR:  return {1'b0, x | y};
      OP_XOR: return {1'b0, x ^ y};
      OP_SLL: return {1'b0, x << (y % 32)};
      OP_SRL: return {1'b0, x >> (y % 32)};
      OP_SRA: return {1'b0, 32'($signed(x) >>> (y % 32))};
      OP_MOV: return {1'b0, x};
      OP_LT:  c = $signed(x) < $signed(y);
      OP_LTU: c = x < y;
      OP_EQ:  c = x == y;
      OP_NE:  c = x != y;
      OP_GE:  c = $signed(x) >= $signed(y);
      default: return '0;
    endcase
    return {c, 31'd0, c};
  endfunction

  initial begin
    logic [32:0] r;
    bit cmp;
    for (int n = 0; n < 3000; n++) begin
      op = opcode_e'(n % 21);
      a  = $urandom; b = $urandom;
      if (n % 7 == 0) b = a;                 // exercise equality
      if (n % 5 == 0) begin a = a % 50 - 25; b = b % 50 - 25; end
      #1;
      r   = ref_model(op, a, b);
      cmp = op inside {OP_LT, OP_LTU, OP_EQ, OP_NE, OP_GE};
      checks++;
      if (result !== r[31:0] || is_cmp !== cmp || (cmp && cond !== r[32])) begin
        failures++;
        $display("FAIL op=%0d a=%h b=%h result=%h exp=%h cond=%b", op, a, b, result, r[31:0], cond);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
