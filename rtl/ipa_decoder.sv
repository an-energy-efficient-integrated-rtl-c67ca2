// ipa_decoder: splits a 20-bit IPA instruction into its fields and classes.
//
// Combinational. Regular instructions give the opcode, the output register
// type, the destination RRF address and the two operand sources. Control
// instructions give the jump targets (jmp: [14:10]; cjmp: true path [14:10],
// false path [9:5]) and the NOP repeat count ([14:0]). The class outputs tell
// the PE whether the instruction writes a result, touches memory, branches or
// ends the kernel. Field widths follow the instruction format of the
// architecture; the bit order and the opcode values are this implementation's.
// The field outputs are bit slices of the instruction, so most output bits
// are wires from the input by design; the logic is in the class outputs.
module ipa_decoder
  import ipa_pkg::*;
(
  input  logic [INSTR_W-1:0]   instr,
  output opcode_e              op,
  output out_type_e            out_type,
  output logic [2:0]           dest,
  output src_t                 in0,
  output src_t                 in1,
  output logic [PC_W-1:0]      tgt_true,
  output logic [PC_W-1:0]      tgt_false,
  output logic [NOP_CNT_W-1:0] nop_cnt,
  output logic                 is_nop,
  output logic                 is_jmp,
  output logic                 is_cjmp,
  output logic                 is_exit,
  output logic                 is_ld,
  output logic                 is_st,
  output logic                 writes_opr,
  output logic                 writes_rrf
);
  instr_t i;
  assign i = instr;

  always_comb begin
    op        = i.op;
    out_type  = i.out_type;
    dest      = i.dest;
    in0       = i.in0;
    in1       = i.in1;
    tgt_true  = instr[14:10];
    tgt_false = instr[9:5];
    nop_cnt   = instr[14:0];
    is_nop    = i.op == OP_NOP;
    is_jmp    = i.op == OP_JMP;
    is_cjmp   = i.op == OP_CJMP;
    is_exit   = i.op == OP_EXIT;
    is_ld     = i.op == OP_LD;
    is_st     = i.op == OP_ST;
    // control, store and NOP instructions have no result
    writes_opr = !(is_nop || is_jmp || is_cjmp || is_exit || is_st) &&
                 (i.out_type == OUT_OPR || i.out_type == OUT_BOTH);
    writes_rrf = !(is_nop || is_jmp || is_cjmp || is_exit || is_st) &&
                 (i.out_type == OUT_RRF || i.out_type == OUT_BOTH);
  end
endmodule
