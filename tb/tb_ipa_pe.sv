// tb_ipa_pe: self-checking test of one processing element with a load/store
// unit. The testbench loads a program and constants over the context bus,
// drives fixed neighbour values, and answers memory requests from a small
// memory that withholds each grant for two cycles (the PE's own pending bit
// raises the global stall). The program exercises every operand source,
// RRF/OPR/both write-back, store then load of the same word, the multiplier,
// a 4-cycle NOP, a compare feeding cjmp (cond_any is the PE's own CR) and
// EXIT. It runs twice, once down each branch, and checks the results and the
// exact cycle count.
// A second phase loads 150 random straight-line programs (31 random ALU,
// compare and move instructions with random operand sources, output types
// and destinations, then EXIT) with random constants and neighbour values,
// and compares the final OPR, all eight RRF entries, the CR and the 32-cycle
// run time with a reference model of the PE written in this testbench.
`timescale 1ns/1ps
module tb_ipa_pe;
  import ipa_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [1:0] cfg_irf_we = 0, cfg_crf_we = 0;
  logic [4:0] cfg_idx = 0;
  logic [63:0] cfg_data = 0;
  logic used = 0, start = 0, cond_any, global_stall;
  logic cr, halted, clockgate_en, nop_busy;
  logic [31:0] nbr_opr [4];
  logic [31:0] opr;
  logic mem_req, mem_we, mem_gnt, mem_pending;
  logic [31:0] mem_addr, mem_wdata, mem_rdata;
  logic [31:0] mem [16];
  int wait_cnt = 0;
  int checks = 0, failures = 0;

  ipa_pe #(.HAS_LSU(1'b1)) dut (.*);
  always #5 clk = ~clk;

  assign cond_any     = cr;
  assign global_stall = mem_pending;
  assign mem_gnt      = mem_req && wait_cnt >= 2;
  assign mem_rdata    = mem[mem_addr[5:2]];
  always @(posedge clk) begin
    if (mem_req && !mem_gnt) wait_cnt <= wait_cnt + 1;
    else wait_cnt <= 0;
    if (mem_req && mem_gnt && mem_we) mem[mem_addr[5:2]] <= mem_wdata;
  end

  initial begin
    repeat (50000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  logic [19:0] prog [12];
  logic [31:0] cons [4];
  logic [19:0] rprog [32];
  logic [31:0] rcons [16];

  // reference model of one instruction's result
  function automatic logic [31:0] model_alu(input opcode_e op, input logic [31:0] a, input logic [31:0] b);
    logic signed [15:0] ah, bh;
    ah = a[15:0]; bh = b[15:0];
    case (op)
      OP_ADD: return a + b;
      OP_SUB: return a - b;
      OP_MUL: return 32'(ah * bh);
      OP_AND: return a & b;
      OP_OR:  return a | b;
      OP_XOR: return a ^ b;
      OP_SLL: return a << (b % 32);
      OP_SRL: return a >> (b % 32);
      OP_SRA: return 32'($signed(a) >>> (b % 32));
      OP_MOV: return a;
      OP_LT:  return {31'd0, $signed(a) < $signed(b)};
      OP_LTU: return {31'd0, a < b};
      OP_EQ:  return {31'd0, a == b};
      OP_NE:  return {31'd0, a != b};
      OP_GE:  return {31'd0, $signed(a) >= $signed(b)};
      default: return 32'd0;
    endcase
  endfunction

  task automatic load_random();
    for (int k = 0; k < 32; k += 2) begin
      @(negedge clk);
      cfg_irf_we = 2'b11; cfg_idx = 5'(k); cfg_data = {12'd0, rprog[k+1], 12'd0, rprog[k]};
    end
    for (int k = 0; k < 16; k += 2) begin
      @(negedge clk);
      cfg_irf_we = 2'b00; cfg_crf_we = 2'b11; cfg_idx = 5'(k); cfg_data = {rcons[k+1], rcons[k]};
    end
    @(negedge clk); cfg_crf_we = 0;
  endtask

  task automatic load_context();
    for (int k = 0; k < 12; k += 2) begin
      @(negedge clk);
      cfg_irf_we = 2'b11; cfg_idx = 5'(k); cfg_data = {12'd0, prog[k+1], 12'd0, prog[k]};
    end
    for (int k = 0; k < 4; k += 2) begin
      @(negedge clk);
      cfg_irf_we = 2'b00; cfg_crf_we = 2'b11; cfg_idx = 5'(k); cfg_data = {cons[k+1], cons[k]};
    end
    @(negedge clk); cfg_crf_we = 0;
  endtask

  initial begin
    int cycles, exp_cycles;
    logic [31:0] n, e, s, w, r2, m, exp_opr;
    bit taken;
    n = 32'd1200; e = 32'd345; w = 32'hFFFF_FFF9;  // -7
    cons[0] = 32'd45; cons[1] = 32'd24; cons[2] = 32'd100; cons[3] = 0;
    prog[0]  = enc(OP_MOV, OUT_OPR, 0, nb(SRC_NORTH), nb(SRC_ZERO));
    prog[1]  = enc(OP_ADD, OUT_RRF, 1, nb(SRC_OPR), nb(SRC_EAST));
    prog[2]  = enc(OP_SUB, OUT_BOTH, 2, rf(1), crf(0));
    prog[3]  = enc(OP_ST, OUT_NONE, 0, nb(SRC_OPR), crf(1));
    prog[4]  = enc(OP_LD, OUT_OPR, 0, crf(1), nb(SRC_ZERO));
    prog[5]  = enc(OP_MUL, OUT_OPR, 0, nb(SRC_OPR), nb(SRC_WEST));
    prog[6]  = enc_nop(4);
    prog[7]  = enc(OP_LT, OUT_NONE, 0, nb(SRC_SOUTH), crf(2));
    prog[8]  = enc_cjmp(10, 9);
    prog[9]  = enc(OP_MOV, OUT_OPR, 0, nb(SRC_ZERO), nb(SRC_ZERO));
    prog[10] = enc(OP_ADD, OUT_BOTH, 3, nb(SRC_OPR), rf(2));
    prog[11] = enc_exit();
    for (int i = 0; i < 16; i++) mem[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    load_context();
    used = 1;
    for (int run = 0; run < 2; run++) begin
      taken = (run == 0);
      s = taken ? 32'd50 : 32'd150;
      nbr_opr[DIR_N] = n; nbr_opr[DIR_E] = e; nbr_opr[DIR_S] = s; nbr_opr[DIR_W] = w;
      @(negedge clk); start = 1; @(negedge clk); start = 0;
      cycles = 0;
      while (!halted) begin @(negedge clk); cycles++; end
      r2 = n + e - 45;
      m  = 32'($signed(r2[15:0]) * $signed(w[15:0]));
      exp_opr = taken ? m + r2 : r2;
      chk(opr == exp_opr, $sformatf("run %0d: opr %0d expected %0d", run, opr, exp_opr));
      chk(dut.u_rrf.mem[3] == exp_opr, "run: r3");
      chk(dut.u_rrf.mem[1] == n + e, "r1");
      chk(mem[6] == r2, "stored word");
      // 12 instructions (minus the skipped one), +3 for NOP 4, +2 stall per access
      exp_cycles = (taken ? 11 : 12) + 3 + 4;
      chk(cycles == exp_cycles, $sformatf("run %0d: %0d cycles, expected %0d", run, cycles, exp_cycles));
      chk(cr == 1'b0, "CR cleared by cjmp");
    end

    // ---- random straight-line programs against the model ----
    for (int t = 0; t < 150; t++) begin
      logic [31:0] m_rrf [8];
      logic [31:0] m_opr, va, vb, res;
      logic        m_cr;
      opcode_e     op;
      src_t        sa, sb;
      logic [1:0]  ot;
      logic [2:0]  dst;
      for (int k = 0; k < 16; k++) rcons[k] = (k % 3 == 0) ? 32'($urandom % 40) : $urandom;
      for (int d = 0; d < 4; d++) nbr_opr[d] = ($urandom % 2) ? $urandom : 32'($urandom % 64);
      for (int k = 0; k < 31; k++) begin
        op  = opcode_e'(1 + $urandom % 15);               // ADD .. GE
        sa  = src_t'($urandom % 32); sb = src_t'($urandom % 32);
        rprog[k] = enc(op, out_type_e'($urandom % 4), $urandom % 8, sa, sb);
      end
      rprog[31] = enc_exit();
      load_random();
      for (int r = 0; r < 8; r++) m_rrf[r] = dut.u_rrf.mem[r];
      m_opr = opr;
      m_cr  = cr;
      @(negedge clk); start = 1; @(negedge clk); start = 0;
      cycles = 0;
      while (!halted) begin @(negedge clk); cycles++; end
      for (int k = 0; k < 31; k++) begin
        {op, ot, dst, sa, sb} = rprog[k];
        for (int o = 0; o < 2; o++) begin
          src_t  sx;
          logic [31:0] v;
          sx = o ? sb : sa;
          if (sx.is_crf)         v = rcons[sx.addr];
          else if (sx.addr < 8)  v = m_rrf[sx.addr[2:0]];
          else if (sx.addr == 8) v = m_opr;
          else if (sx.addr < 13) v = nbr_opr[sx.addr - 9];
          else                   v = 32'd0;
          if (o) vb = v; else va = v;
        end
        res = model_alu(op, va, vb);
        if (op inside {OP_LT, OP_LTU, OP_EQ, OP_NE, OP_GE}) m_cr = res[0];
        if (ot[0]) m_opr = res;
        if (ot[1]) m_rrf[dst] = res;
      end
      chk(opr == m_opr, $sformatf("random %0d: opr %h expected %h", t, opr, m_opr));
      for (int r = 0; r < 8; r++)
        chk(dut.u_rrf.mem[r] == m_rrf[r], $sformatf("random %0d: r%0d %h expected %h", t, r, dut.u_rrf.mem[r], m_rrf[r]));
      chk(cr == m_cr, $sformatf("random %0d: cr %0d expected %0d", t, cr, m_cr));
      chk(cycles == 32, $sformatf("random %0d: %0d cycles, expected 32", t, cycles));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
