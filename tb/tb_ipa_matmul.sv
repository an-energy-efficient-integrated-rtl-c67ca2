// tb_ipa_matmul: matrix multiplication C = A x B on the IPA at its default
// configuration, for N = 2, 4, 8, 16 and 32 (the size sweep used to study how
// the IPA scales with kernel size). The whole three-deep loop nest runs on
// the array, with no host involvement between iterations:
//   PE0 (LSU)  walks row i of A and loads A[i][k]
//   PE2 (LSU)  walks column j of B and loads B[k][j]
//   PE1        multiplies the two values it reads from its west and east
//              neighbours, accumulates, and keeps the loop counters i, j, k
//   PE5 (LSU)  reads the finished sum from its north neighbour (PE1) and
//              stores C[i][j]
// All loop exits are cjmps steered by PE1's condition register. The test
// checks every element of C, and the exact cycle count: 6 cycles per inner
// iteration plus one stall cycle whenever A[i][k] and B[k][j] fall in the
// same bank, 6 per middle iteration, 4 per outer iteration, 2 more.
// The matrix sizes are those of the architecture's own size sweep; the
// four-PE mapping is written by hand for this test and is not the output of
// an optimising compiler, so its cycle counts are not a performance claim.
`timescale 1ns/1ps
module tb_ipa_matmul;
  import ipa_pkg::*;
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

  `include "tb/ipa_tb_ctx.svh"

  localparam int A_BASE = 'h0000;
  localparam int B_BASE = 'h1004;   // one word off, so some loads collide
  localparam int C_BASE = 'h3000;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic build(input int n);
    clear_programs();
    set_const(0, 0, A_BASE); set_const(0, 1, 4);     set_const(0, 2, 4 * n);
    set_const(1, 0, n);      set_const(1, 1, 1);
    set_const(2, 0, B_BASE); set_const(2, 1, 4 * n); set_const(2, 2, 4);
    set_const(5, 0, C_BASE); set_const(5, 1, 4);
    for (int s = 0; s < 18; s++) begin
      logic [19:0] i0, i1, i2, i5;
      i0 = enc_nop(1); i1 = enc_nop(1); i2 = enc_nop(1); i5 = enc_nop(1);
      case (s)
        0:  begin i0 = enc(OP_MOV, OUT_RRF, 0, crf(0), nb(SRC_ZERO));          // A row base
                  i1 = enc(OP_MOV, OUT_RRF, 2, nb(SRC_ZERO), nb(SRC_ZERO));    // i = 0
                  i5 = enc(OP_MOV, OUT_RRF, 0, crf(0), nb(SRC_ZERO)); end      // C pointer
        1:  begin i1 = enc(OP_MOV, OUT_RRF, 1, nb(SRC_ZERO), nb(SRC_ZERO));    // j = 0
                  i2 = enc(OP_MOV, OUT_RRF, 0, crf(0), nb(SRC_ZERO)); end      // B column base
        2:  begin i0 = enc(OP_MOV, OUT_RRF, 1, rf(0), nb(SRC_ZERO));           // A pointer
                  i1 = enc(OP_MOV, OUT_RRF, 0, nb(SRC_ZERO), nb(SRC_ZERO));    // k = 0
                  i2 = enc(OP_MOV, OUT_RRF, 1, rf(0), nb(SRC_ZERO)); end       // B pointer
        3:        i1 = enc(OP_MOV, OUT_RRF, 3, nb(SRC_ZERO), nb(SRC_ZERO));    // sum = 0
        4:  begin i0 = enc(OP_LD, OUT_OPR, 0, rf(1), nb(SRC_ZERO));
                  i2 = enc(OP_LD, OUT_OPR, 0, rf(1), nb(SRC_ZERO)); end
        5:  begin i0 = enc(OP_ADD, OUT_RRF, 1, rf(1), crf(1));
                  i1 = enc(OP_MUL, OUT_RRF, 4, nb(SRC_WEST), nb(SRC_EAST));
                  i2 = enc(OP_ADD, OUT_RRF, 1, rf(1), crf(1)); end
        6:        i1 = enc(OP_ADD, OUT_RRF, 3, rf(3), rf(4));
        7:        i1 = enc(OP_ADD, OUT_RRF, 0, rf(0), crf(1));                 // k++
        8:        i1 = enc(OP_LT, OUT_NONE, 0, rf(0), crf(0));
        9:  begin i0 = enc_cjmp(4, 10); i1 = i0; i2 = i0; i5 = i0; end
        10: begin i1 = enc(OP_MOV, OUT_OPR, 0, rf(3), nb(SRC_ZERO));
                  i2 = enc(OP_ADD, OUT_RRF, 0, rf(0), crf(2)); end             // next column
        11: begin i1 = enc(OP_ADD, OUT_RRF, 1, rf(1), crf(1));                 // j++
                  i5 = enc(OP_ST, OUT_NONE, 0, nb(SRC_NORTH), rf(0)); end
        12: begin i1 = enc(OP_LT, OUT_NONE, 0, rf(1), crf(0));
                  i5 = enc(OP_ADD, OUT_RRF, 0, rf(0), crf(1)); end
        13: begin i0 = enc_cjmp(2, 14); i1 = i0; i2 = i0; i5 = i0; end
        14: begin i0 = enc(OP_ADD, OUT_RRF, 0, rf(0), crf(2));                 // next row
                  i1 = enc(OP_ADD, OUT_RRF, 2, rf(2), crf(1)); end             // i++
        15:       i1 = enc(OP_LT, OUT_NONE, 0, rf(2), crf(0));
        16: begin i0 = enc_cjmp(1, 17); i1 = i0; i2 = i0; i5 = i0; end
        default: begin i0 = enc_exit(); i1 = i0; i2 = i0; i5 = i0; end
      endcase
      put(0, i0); put(1, i1); put(2, i2); put(5, i5);
    end
    build_context();
  endtask

  int sizes [5] = '{2, 4, 8, 16, 32};
  logic signed [31:0] a [32][32], b [32][32];

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    foreach (sizes[si]) begin
      int n, exp_stall, exp_exec;
      logic signed [31:0] acc;
      logic [31:0] got;
      n = sizes[si];
      build(n);
      preload_context();
      exp_stall = 0;
      for (int i = 0; i < n; i++)
        for (int j = 0; j < n; j++) begin
          a[i][j] = $signed($urandom % 401) - 200;
          b[i][j] = $signed($urandom % 401) - 200;
          host_write(A_BASE + 4 * (i * n + j), a[i][j]);
          host_write(B_BASE + 4 * (i * n + j), b[i][j]);
        end
      for (int i = 0; i < n; i++)
        for (int j = 0; j < n; j++)
          for (int k = 0; k < n; k++)
            if (((A_BASE / 4 + i * n + k) % 4) == ((B_BASE / 4 + k * n + j) % 4)) exp_stall++;
      run_kernel();
      for (int i = 0; i < n; i++)
        for (int j = 0; j < n; j++) begin
          acc = 0;
          for (int k = 0; k < n; k++) acc += a[i][k] * b[k][j];
          host_read(C_BASE + 4 * (i * n + j), got);
          check(got == acc, $sformatf("N=%0d C[%0d][%0d] = %0d, expected %0d", n, i, j, $signed(got), acc));
        end
      exp_exec = 2 + n * (4 + n * (6 + 6 * n)) + exp_stall;
      check(stall_cycles == 32'(exp_stall), $sformatf("N=%0d stall cycles %0d, expected %0d", n, stall_cycles, exp_stall));
      check(exec_cycles == 32'(exp_exec), $sformatf("N=%0d exec cycles %0d, expected %0d", n, exec_cycles, exp_exec));
      $display("matmul N=%0d: context load %0d cycles, execution %0d cycles (%0d stall)",
               n, cfg_cycles, exec_cycles, stall_cycles);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
