// tb_ipa_top: end-to-end test of the IPA at its default configuration
// (4 x 4 PEs, 8 LSUs, 4 TCDM banks, 32 KB TCDM, 8 KB GCM).
//
// The kernel, mapped by hand onto three PEs plus one PE that only keeps step:
//   for (i = 0; i < N; i++)
//     c[i] = (a[i] < b[i]) ? a[i] * b[i] : a[i] - b[i];
// PE0 and PE2 (both with LSUs) load a[i] and b[i]; the two arrays sit 0x100
// bytes apart, so both loads hit the same bank and every iteration takes one
// global-stall cycle. PE1 (no LSU) reads both values from its west and east
// neighbours, compares them (its CR steers the cjmp of every PE), multiplies
// or subtracts, and keeps the loop counter. PE2 stores the result it reads
// from PE1. PE4 carries only NOPs and the jumps, with a two-cycle NOP that
// is in flight when the stall hits, so its counter must pause. The other 12
// PEs are unused.
//
// The test assembles the context, preloads the GCM and the TCDM through the
// host ports, runs the kernel and checks the outputs, the context-load cycle
// count, the execution cycle count (worked out from the schedule: 10 cycles
// for a taken branch, 9 otherwise, plus 6 of prologue and epilogue) and that
// each mechanism (stall, NOP gating, NOP counter held by a stall, unused-PE
// gating, both cjmp directions, jmp) occurred.
`timescale 1ns/1ps
module tb_ipa_top;
  import ipa_pkg::*;

  localparam int N      = 12;
  localparam int A_BASE = 'h000;
  localparam int B_BASE = 'h100;
  localparam int C_BASE = 'h200;

  logic        clk = 0, rst_n = 0;
  logic        gcm_we = 0;
  logic [9:0]  gcm_waddr = 0;
  logic [63:0] gcm_wdata = 0;
  logic        h_req = 0, h_we = 0;
  logic [31:0] h_addr = 0, h_wdata = 0;
  logic        h_gnt;
  logic [31:0] h_rdata;
  logic        start = 0;
  logic [9:0]  ctx_base = 0;
  logic        busy, done, global_stall;
  logic [31:0] cfg_cycles, exec_cycles, stall_cycles;
  logic [15:0] clockgate_en, nop_busy, used;

  ipa_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // watchdog
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- program assembly ----
  logic [19:0] prog  [16][32];
  int          np    [16];
  logic [31:0] cons  [16][16];
  int          nc    [16];
  logic [63:0] ctx   [$];

  task automatic put(input int pe, input logic [19:0] ins);
    prog[pe][np[pe]] = ins; np[pe]++;
  endtask

  function automatic logic [19:0] nop1(); return enc_nop(1); endfunction

  task automatic build_programs();
    for (int p = 0; p < 16; p++) begin np[p] = 0; nc[p] = 0; end
    // constants
    cons[0][0] = A_BASE; cons[0][1] = 4; nc[0] = 2;
    cons[1][0] = N;      cons[1][1] = 1; cons[1][2] = 0; nc[1] = 3;
    cons[2][0] = B_BASE; cons[2][1] = 4; cons[2][2] = C_BASE; nc[2] = 3;
    // slot 0
    put(0, enc(OP_MOV, OUT_RRF, 0, crf(0), nb(SRC_ZERO)));
    put(1, enc(OP_MOV, OUT_RRF, 0, crf(2), nb(SRC_ZERO)));
    put(2, enc(OP_MOV, OUT_RRF, 0, crf(0), nb(SRC_ZERO)));
    // slot 1
    put(0, nop1()); put(1, nop1());
    put(2, enc(OP_MOV, OUT_RRF, 1, crf(2), nb(SRC_ZERO)));
    // slot 2 (loop head)
    put(0, nop1()); put(1, nop1()); put(2, nop1());
    // slot 3: loads
    put(0, enc(OP_LD, OUT_OPR, 0, rf(0), nb(SRC_ZERO)));
    put(1, nop1());
    put(2, enc(OP_LD, OUT_OPR, 0, rf(0), nb(SRC_ZERO)));
    // slot 4: compare, pointer increments
    put(0, enc(OP_ADD, OUT_RRF, 0, rf(0), crf(1)));
    put(1, enc(OP_LT, OUT_NONE, 0, nb(SRC_WEST), nb(SRC_EAST)));
    put(2, enc(OP_ADD, OUT_RRF, 0, rf(0), crf(1)));
    // slot 5
    for (int p = 0; p < 3; p++) put(p, enc_cjmp(6, 8));
    // slot 6: true path
    put(0, nop1()); put(1, enc(OP_MUL, OUT_OPR, 0, nb(SRC_WEST), nb(SRC_EAST))); put(2, nop1());
    // slot 7
    for (int p = 0; p < 3; p++) put(p, enc_jmp(9));
    // slot 8: false path
    put(0, nop1()); put(1, enc(OP_SUB, OUT_OPR, 0, nb(SRC_WEST), nb(SRC_EAST))); put(2, nop1());
    // slot 9: store, i++
    put(0, nop1());
    put(1, enc(OP_ADD, OUT_RRF, 0, rf(0), crf(1)));
    put(2, enc(OP_ST, OUT_NONE, 0, nb(SRC_WEST), rf(1)));
    // slot 10: c pointer, loop test
    put(0, nop1());
    put(1, enc(OP_LT, OUT_NONE, 0, rf(0), crf(0)));
    put(2, enc(OP_ADD, OUT_RRF, 1, rf(1), crf(1)));
    // slot 11
    for (int p = 0; p < 3; p++) put(p, enc_cjmp(2, 12));
    // slot 12, 13
    for (int p = 0; p < 3; p++) put(p, enc_nop(3));
    for (int p = 0; p < 3; p++) put(p, enc_exit());
    // PE4: same control flow, compressed NOPs
    put(4, enc_nop(2));        // 0: slots 0-1
    put(4, enc_nop(2));        // 1: slots 2-3 (loop head)
    put(4, nop1());            // 2: slot 4
    put(4, enc_cjmp(4, 6));    // 3: slot 5
    put(4, nop1());            // 4: slot 6
    put(4, enc_jmp(7));        // 5: slot 7
    put(4, nop1());            // 6: slot 8
    put(4, enc_nop(2));        // 7: slots 9-10
    put(4, enc_cjmp(1, 9));    // 8: slot 11
    put(4, enc_nop(3));        // 9: slot 12
    put(4, enc_exit());        // 10: slot 13
  endtask

  task automatic build_context();
    ctx.delete();
    for (int p = 0; p < 16; p++) begin
      if (np[p] == 0 && nc[p] == 0) continue;
      ctx.push_back({4'h1, 8'(p), 6'd0, 6'(np[p]), 3'd0, 5'(nc[p]), 32'd0});
      for (int k = 0; k < np[p]; k += 2)
        ctx.push_back({12'd0, (k + 1 < np[p]) ? prog[p][k+1] : 20'd0, 12'd0, prog[p][k]});
      for (int k = 0; k < nc[p]; k += 2)
        ctx.push_back({(k + 1 < nc[p]) ? cons[p][k+1] : 32'd0, cons[p][k]});
    end
    ctx.push_back({4'hF, 60'd0});
  endtask

  task automatic host_write(input logic [31:0] a, input logic [31:0] d);
    @(negedge clk);
    h_req = 1; h_we = 1; h_addr = a; h_wdata = d;
    #1; while (!h_gnt) begin @(negedge clk); #1; end
    @(negedge clk); h_req = 0; h_we = 0;
  endtask

  task automatic host_read(input logic [31:0] a, output logic [31:0] d);
    @(negedge clk);
    h_req = 1; h_we = 0; h_addr = a;
    #1; while (!h_gnt) begin @(negedge clk); #1; end
    d = h_rdata;
    @(negedge clk); h_req = 0;
  endtask

  // ---- mechanism counters ----
  int n_stall = 0, n_nop_gate = 0, n_nop_hold = 0, n_unused_on = 0, n_unused = 0;
  int n_taken = 0, n_not_taken = 0, n_jmp = 0;
  always @(posedge clk) if (rst_n && busy) begin
    if (global_stall) n_stall++;
    if (|nop_busy) n_nop_gate++;
    if (nop_busy[4] && global_stall) n_nop_hold++;
    if (dut.u_ctrl.state == dut.u_ctrl.S_RUN) begin
      if (|(clockgate_en & ~used)) n_unused_on++;
      if (~&used) n_unused++;
    end
    if (dut.u_pea.g_pe[1].u_pe.clockgate_en && dut.u_pea.g_pe[1].u_pe.is_cjmp && dut.u_pea.g_pe[1].u_pe.pc == 5) begin
      if (dut.u_pea.cond_any) n_taken++; else n_not_taken++;
    end
    if (dut.u_pea.g_pe[1].u_pe.clockgate_en && dut.u_pea.g_pe[1].u_pe.is_jmp) n_jmp++;
  end

  logic signed [31:0] a [N], b [N];
  logic [31:0] got, exp_c;
  int exp_exec, n_true;

  initial begin
    build_programs();
    build_context();
    repeat (3) @(posedge clk);
    rst_n = 1;
    // preload the context
    foreach (ctx[k]) begin
      @(negedge clk); gcm_we = 1; gcm_waddr = 10'(k); gcm_wdata = ctx[k];
    end
    @(negedge clk); gcm_we = 0;
    // input data, both branch directions guaranteed
    n_true = 0;
    for (int i = 0; i < N; i++) begin
      a[i] = $signed(($urandom % 2001)) - 1000;
      b[i] = $signed(($urandom % 2001)) - 1000;
      if (i == 0) begin a[i] = -5; b[i] = 7; end
      if (i == 1) begin a[i] = 9;  b[i] = 3; end
      if (a[i] < b[i]) n_true++;
      host_write(A_BASE + 4*i, a[i]);
      host_write(B_BASE + 4*i, b[i]);
      host_write(C_BASE + 4*i, 32'hDEAD_BEEF);
    end
    // run
    @(negedge clk); start = 1; ctx_base = 0;
    @(negedge clk); start = 0;
    check(busy, "busy after start");
    wait (done);
    @(negedge clk);
    check(!busy, "idle after done");
    // results
    for (int i = 0; i < N; i++) begin
      host_read(C_BASE + 4*i, got);
      exp_c = (a[i] < b[i]) ? 32'($signed(a[i][15:0]) * $signed(b[i][15:0])) : 32'(a[i] - b[i]);
      check(got == exp_c, $sformatf("c[%0d] = %0d, expected %0d", i, $signed(got), $signed(exp_c)));
    end
    // timing
    check(cfg_cycles == 32'(ctx.size() + 1),
          $sformatf("context load took %0d cycles, expected %0d", cfg_cycles, ctx.size() + 1));
    exp_exec = 2 + n_true * 10 + (N - n_true) * 9 + 3 + 1;
    check(exec_cycles == 32'(exp_exec),
          $sformatf("execution took %0d cycles, expected %0d", exec_cycles, exp_exec));
    check(stall_cycles == 32'(N), $sformatf("stall cycles %0d, expected %0d", stall_cycles, N));
    check(used == 16'h0017, $sformatf("used mask %h", used));
    // mechanisms
    check(n_stall > 0, "global stall never happened");
    check(n_nop_gate > 0, "multi-cycle NOP gating never happened");
    check(n_nop_hold > 0, "NOP counter never held by a stall");
    check(n_unused > 0, "no unused PE");
    check(n_unused_on == 0, "an unused PE was clocked");
    check(n_taken > 0, "cjmp never took the true path");
    check(n_not_taken > 0, "cjmp never took the false path");
    check(n_jmp > 0, "jmp never executed");
    $display("mechanisms: stall=%0d nop_gate=%0d nop_hold=%0d unused=%0d taken=%0d not_taken=%0d jmp=%0d",
             n_stall, n_nop_gate, n_nop_hold, n_unused, n_taken, n_not_taken, n_jmp);
    $display("cfg_cycles=%0d exec_cycles=%0d stall_cycles=%0d", cfg_cycles, exec_cycles, stall_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
