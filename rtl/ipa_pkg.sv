// ipa_pkg: types and constants shared by the Integrated Programmable-Array
// (IPA) accelerator.
//
// The IPA is a coarse-grained reconfigurable array of processing elements (PEs)
// that executes whole control/data-flow graphs. Every PE fetches one 20-bit
// instruction per cycle from its own instruction register file (IRF).
//
// Instruction format (20 bits, fields MSB first, widths as the architecture
// defines them):
//   [19:15] opcode   [14:13] output register type   [12:10] destination RRF
//   [9]     IN0 type [8:5]   IN0 address            [4]     IN1 type  [3:0] IN1 address
// Jumps reuse the low 15 bits: jmp target in [14:10]; cjmp true target in
// [14:10] and false target in [9:5]. A NOP carries its repeat count in [14:0].
//
// The exact opcode numbering, the operand-source numbering, the output type
// encoding, the EXIT opcode that ends a kernel and the 64-bit context word
// layout are choices of this implementation; the field widths, the register
// file sizes, the 32-bit datapath and the 16x16->32 multiplier follow the
// architecture description.
package ipa_pkg;

  localparam int unsigned INSTR_W   = 20;
  localparam int unsigned DATA_W    = 32;
  localparam int unsigned IRF_DEPTH = 32;  // 32 instructions of 20 bits
  localparam int unsigned RRF_DEPTH = 8;   // 8 regular registers of 32 bits
  localparam int unsigned CRF_DEPTH = 16;  // 16 constants of 32 bits
  localparam int unsigned PC_W      = $clog2(IRF_DEPTH);
  localparam int unsigned NOP_CNT_W = 15;

  typedef enum logic [4:0] {
    OP_NOP  = 5'd0,
    OP_ADD  = 5'd1,
    OP_SUB  = 5'd2,
    OP_MUL  = 5'd3,   // signed 16 x 16 -> 32
    OP_AND  = 5'd4,
    OP_OR   = 5'd5,
    OP_XOR  = 5'd6,
    OP_SLL  = 5'd7,
    OP_SRL  = 5'd8,
    OP_SRA  = 5'd9,
    OP_MOV  = 5'd10,  // result = IN0
    OP_LT   = 5'd11,  // compares: result 0/1 and CR
    OP_LTU  = 5'd12,
    OP_EQ   = 5'd13,
    OP_NE   = 5'd14,
    OP_GE   = 5'd15,
    OP_LD   = 5'd16,  // result = mem[IN0 + IN1]
    OP_ST   = 5'd17,  // mem[IN1] = IN0
    OP_JMP  = 5'd18,
    OP_CJMP = 5'd19,
    OP_EXIT = 5'd20   // end of kernel: the PE halts
  } opcode_e;

  // Output register type: where the result goes.
  typedef enum logic [1:0] {
    OUT_NONE = 2'd0,
    OUT_OPR  = 2'd1,
    OUT_RRF  = 2'd2,
    OUT_BOTH = 2'd3
  } out_type_e;

  // Operand source, type bit = 0 (type bit = 1 selects CRF[addr]).
  localparam logic [3:0] SRC_OPR   = 4'd8;   // own output register
  localparam logic [3:0] SRC_NORTH = 4'd9;
  localparam logic [3:0] SRC_EAST  = 4'd10;
  localparam logic [3:0] SRC_SOUTH = 4'd11;
  localparam logic [3:0] SRC_WEST  = 4'd12;
  localparam logic [3:0] SRC_ZERO  = 4'd13;

  typedef struct packed {
    logic       is_crf;  // 1: CRF[addr], 0: RRF / OPR / neighbour
    logic [3:0] addr;
  } src_t;

  typedef struct packed {
    opcode_e    op;
    out_type_e  out_type;
    logic [2:0] dest;
    src_t       in0;
    src_t       in1;
  } instr_t;

  // Neighbour directions of the torus.
  typedef enum logic [1:0] {DIR_N = 2'd0, DIR_E = 2'd1, DIR_S = 2'd2, DIR_W = 2'd3} dir_e;

  // Context words in the global context memory (64 bits each).
  //   header : [63:60] tag, [59:52] PE index, [45:40] instruction count,
  //            [36:32] constant count
  //   then ceil(ni/2) words with instructions in [19:0] (first) and [51:32],
  //   then ceil(nc/2) words with constants in [31:0] (first) and [63:32].
  localparam logic [3:0] CTX_TAG_PE  = 4'h1;
  localparam logic [3:0] CTX_TAG_END = 4'hF;

  // ---- encoding helpers (used by testbenches to assemble programs) ----
  function automatic src_t rf(input int unsigned r);
    return '{is_crf: 1'b0, addr: 4'(r)};
  endfunction
  function automatic src_t crf(input int unsigned c);
    return '{is_crf: 1'b1, addr: 4'(c)};
  endfunction
  function automatic src_t nb(input logic [3:0] s);
    return '{is_crf: 1'b0, addr: s};
  endfunction

  function automatic logic [INSTR_W-1:0] enc(input opcode_e op, input out_type_e ot,
                                              input int unsigned dest, input src_t a,
                                              input src_t b);
    instr_t i;
    i.op = op; i.out_type = ot; i.dest = 3'(dest); i.in0 = a; i.in1 = b;
    return i;
  endfunction

  function automatic logic [INSTR_W-1:0] enc_nop(input int unsigned n);
    return {OP_NOP, 15'(n)};
  endfunction
  function automatic logic [INSTR_W-1:0] enc_jmp(input int unsigned t);
    return {OP_JMP, 5'(t), 10'd0};
  endfunction
  function automatic logic [INSTR_W-1:0] enc_cjmp(input int unsigned t, input int unsigned f);
    return {OP_CJMP, 5'(t), 5'(f), 5'd0};
  endfunction
  function automatic logic [INSTR_W-1:0] enc_exit();
    return {OP_EXIT, 15'd0};
  endfunction

endpackage
