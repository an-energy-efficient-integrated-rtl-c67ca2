// ipa_pe: one processing element (tile) of the IPA array.
//
// Each cycle the PE reads the instruction at its program counter from its
// instruction register file (IRF), decodes it, selects two operands, runs
// them through the ALU and writes the result to its output register (OPR),
// to a regular register (RRF), or both. Operands come from the RRF, the
// constant register file (CRF, which holds the immediates so instructions
// stay 20 bits wide), the PE's own OPR, or the OPR of its north, east, south
// or west neighbour on the torus. A value written in one cycle is readable by
// the neighbours in the next one: the PE executes one instruction per cycle
// without an internal pipeline.
//
// Compares load the condition register (CR); every cjmp clears it again. The
// sequencer (ipa_pe_ctrl) handles jmp, cjmp (steered by the OR of all CRs,
// `cond_any`) and EXIT. The PMU gates the PE when it is unused, halted, in a
// multi-cycle NOP, or when the global stall is high. With HAS_LSU the PE has a
// load/store unit on the TCDM interconnect; LD reads mem[IN0+IN1], ST stores
// IN0 at address IN1. A PE without an LSU ignores LD/ST.
//
// Context loading: while the array is idle the IPA controller writes the IRF
// (cfg_irf_we) and CRF (cfg_crf_we), two entries per cycle: slot 0 at
// cfg_idx from cfg_data[31:0], slot 1 at cfg_idx+1 from cfg_data[63:32]
// (instructions use the low 20 bits of a slot).
//
// The components and their roles follow the architecture's PE description;
// the single-cycle timing, the operand encoding and the CR clearing on cjmp
// are this implementation's choices.
module ipa_pe
  import ipa_pkg::*;
#(
  parameter bit HAS_LSU = 1'b1
) (
  input  logic              clk,
  input  logic              rst_n,
  // context load
  input  logic [1:0]        cfg_irf_we,   // slot 0: cfg_idx, slot 1: cfg_idx+1
  input  logic [1:0]        cfg_crf_we,
  input  logic [4:0]        cfg_idx,
  input  logic [63:0]       cfg_data,     // slot 0 in [31:0], slot 1 in [63:32]
  // control
  input  logic              used,
  input  logic              start,
  input  logic              cond_any,
  input  logic              global_stall,
  output logic              cr,
  output logic              halted,
  output logic              clockgate_en,
  output logic              nop_busy,
  // torus
  input  logic [DATA_W-1:0] nbr_opr [4],  // indexed by dir_e
  output logic [DATA_W-1:0] opr,
  // memory port (tied off when HAS_LSU = 0)
  output logic              mem_req,
  output logic              mem_we,
  output logic [DATA_W-1:0] mem_addr,
  output logic [DATA_W-1:0] mem_wdata,
  input  logic              mem_gnt,
  input  logic [DATA_W-1:0] mem_rdata,
  output logic              mem_pending
);
  logic [PC_W-1:0]      pc;
  logic [INSTR_W-1:0]   instr, instr_unused;
  opcode_e              op;
  out_type_e            out_type;  // folded into writes_opr / writes_rrf
  logic [2:0]           dest;
  src_t                 in0, in1;
  logic [PC_W-1:0]      tgt_true, tgt_false;
  logic [NOP_CNT_W-1:0] nop_cnt;
  logic is_nop, is_jmp, is_cjmp, is_exit, is_ld, is_st, writes_opr, writes_rrf;
  logic issue, en;
  logic [DATA_W-1:0] rrf_a, rrf_b, crf_a, crf_b, opa, opb, alu_res, ld_data, wb;
  logic alu_cond, alu_is_cmp;

  // instruction register file: written by the context bus, read at pc
  ipa_regfile #(.WIDTH(INSTR_W), .DEPTH(IRF_DEPTH)) u_irf (
    .clk, .rst_n, .we(cfg_irf_we[0]), .waddr(cfg_idx), .wdata(cfg_data[INSTR_W-1:0]),
    .we1(cfg_irf_we[1]), .waddr1(cfg_idx + 5'd1), .wdata1(cfg_data[32 +: INSTR_W]),
    .raddr0(pc), .rdata0(instr), .raddr1(pc), .rdata1(instr_unused));

  ipa_decoder u_dec (
    .instr, .op, .out_type, .dest, .in0, .in1, .tgt_true, .tgt_false, .nop_cnt,
    .is_nop, .is_jmp, .is_cjmp, .is_exit, .is_ld, .is_st, .writes_opr, .writes_rrf);

  ipa_pmu #(.CNT_W(NOP_CNT_W)) u_pmu (
    .clk, .rst_n, .clear(start), .used, .halted, .global_stall,
    .nop_load(is_nop), .nop_count(nop_cnt), .issue, .clockgate_en(en), .nop_busy);
  assign clockgate_en = en;

  ipa_pe_ctrl #(.AW(PC_W)) u_ctrl (
    .clk, .rst_n, .start, .en, .is_jmp, .is_cjmp, .is_exit, .tgt_true, .tgt_false,
    .cond_any, .pc, .halted);

  // regular and constant register files
  ipa_regfile #(.WIDTH(DATA_W), .DEPTH(RRF_DEPTH)) u_rrf (
    .clk, .rst_n, .we(en && writes_rrf), .waddr(dest), .wdata(wb),
    .we1(1'b0), .waddr1(3'd0), .wdata1('0),
    .raddr0(in0.addr[2:0]), .rdata0(rrf_a), .raddr1(in1.addr[2:0]), .rdata1(rrf_b));

  ipa_regfile #(.WIDTH(DATA_W), .DEPTH(CRF_DEPTH)) u_crf (
    .clk, .rst_n, .we(cfg_crf_we[0]), .waddr(cfg_idx[3:0]), .wdata(cfg_data[31:0]),
    .we1(cfg_crf_we[1]), .waddr1(cfg_idx[3:0] + 4'd1), .wdata1(cfg_data[63:32]),
    .raddr0(in0.addr), .rdata0(crf_a), .raddr1(in1.addr), .rdata1(crf_b));

  function automatic logic [DATA_W-1:0] sel(input src_t s, input logic [DATA_W-1:0] rrf_v,
                                           input logic [DATA_W-1:0] crf_v,
                                           input logic [DATA_W-1:0] own,
                                           input logic [DATA_W-1:0] nn,
                                           input logic [DATA_W-1:0] ne,
                                           input logic [DATA_W-1:0] ns,
                                           input logic [DATA_W-1:0] nw);
    if (s.is_crf)            return crf_v;
    if (!s.addr[3])          return rrf_v;
    case (s.addr)
      SRC_OPR:   return own;
      SRC_NORTH: return nn;
      SRC_EAST:  return ne;
      SRC_SOUTH: return ns;
      SRC_WEST:  return nw;
      default:   return '0;
    endcase
  endfunction

  assign opa = sel(in0, rrf_a, crf_a, opr, nbr_opr[DIR_N], nbr_opr[DIR_E], nbr_opr[DIR_S], nbr_opr[DIR_W]);
  assign opb = sel(in1, rrf_b, crf_b, opr, nbr_opr[DIR_N], nbr_opr[DIR_E], nbr_opr[DIR_S], nbr_opr[DIR_W]);

  ipa_alu u_alu (.op, .a(opa), .b(opb), .result(alu_res), .cond(alu_cond), .is_cmp(alu_is_cmp));

  generate
    if (HAS_LSU) begin : g_lsu
      ipa_lsu u_lsu (
        .clk, .rst_n, .issue, .is_ld, .is_st, .addr(is_st ? opb : alu_res), .wdata(opa),
        .global_stall, .req(mem_req), .we(mem_we), .mem_addr, .mem_wdata,
        .gnt(mem_gnt), .rdata(mem_rdata), .pending(mem_pending), .ld_data);
    end else begin : g_no_lsu
      assign mem_req     = 1'b0;
      assign mem_we      = 1'b0;
      assign mem_addr    = '0;
      assign mem_wdata   = '0;
      assign mem_pending = 1'b0;
      assign ld_data     = '0;
      // the mapping never places a memory access on a PE without an LSU
      a_no_mem: assert property (@(posedge clk) disable iff (!rst_n) en |-> !(is_ld || is_st));
    end
  endgenerate

  assign wb = is_ld ? ld_data : alu_res;

  // output and condition registers
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      opr <= '0;
      cr  <= 1'b0;
    end else if (start) begin
      cr  <= 1'b0;
    end else if (en) begin
      if (writes_opr && !(is_ld && !HAS_LSU)) opr <= wb;
      if (alu_is_cmp)   cr <= alu_cond;
      else if (is_cjmp) cr <= 1'b0;
    end
  end
endmodule
