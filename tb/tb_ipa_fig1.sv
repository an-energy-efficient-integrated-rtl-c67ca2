// tb_ipa_fig1: the data-sharing example used to motivate the IPA. A product
// A[i] = B[i] * C[i] for two elements is followed by a reduction
// sum = A[0] + A[1]. On a processor cluster the products go through shared
// memory; on the IPA they move between PEs:
//   PE0 loads B[0] and C[0] and multiplies them, PE2 does the same for
//   element 1 (both have an LSU), and PE1 between them moves the two
//   products in from its west and east neighbours and adds them.
// The architecture's operation count for this example on the IPA is 4
// memory operations, 3 arithmetic operations and 2 moves; this test counts
// the instructions the array actually issues (by watching each PE's decoded
// opcode while it is clock-enabled, and the LSU grants) and checks those
// three numbers, the sum, that no store is needed, and the run time of 7
// cycles. PE0 and PE2 execute EXIT right after their multiply: their output
// registers keep the products while they are gated, for PE1 to read.
// The operand addresses and values are this test's own.
`timescale 1ns/1ps
module tb_ipa_fig1;
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

  localparam int B_ADDR = 'h40, C_ADDR = 'h60;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (20_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // operation counters, enabled only while the kernel runs
  bit counting = 0;
  int n_mem = 0, n_store = 0, n_arith = 0, n_mov = 0;
  opcode_e op_of [16];
  for (genvar p = 0; p < 16; p++) begin : g_peek
    assign op_of[p] = dut.u_pea.g_pe[p].u_pe.op;
  end
  always @(posedge clk) if (counting) begin
    for (int l = 0; l < 8; l++)
      if (dut.lsu_req[l] && dut.lsu_gnt[l]) begin
        n_mem++;
        if (dut.lsu_we[l]) n_store++;
      end
    for (int p = 0; p < 16; p++)
      if (clockgate_en[p])
        case (op_of[p])
          OP_ADD, OP_SUB, OP_MUL: n_arith++;
          OP_MOV:                 n_mov++;
          default: ;
        endcase
  end

  initial begin
    logic signed [31:0] b0, b1, c0, c1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    clear_programs();
    for (int e = 0; e < 2; e++) begin
      int p;
      p = 2 * e;                              // PE0, PE2
      set_const(p, 0, B_ADDR + 4 * e); set_const(p, 1, C_ADDR + 4 * e);
      put(p, enc(OP_LD,  OUT_RRF, 0, crf(0), nb(SRC_ZERO)));   // B[e]
      put(p, enc(OP_LD,  OUT_RRF, 1, crf(1), nb(SRC_ZERO)));   // C[e]
      put(p, enc(OP_MUL, OUT_OPR, 0, rf(0), rf(1)));           // A[e]
      put(p, enc_exit());
    end
    put(1, enc_nop(3));
    put(1, enc(OP_MOV, OUT_RRF, 0, nb(SRC_WEST), nb(SRC_ZERO)));  // A[0]
    put(1, enc(OP_MOV, OUT_RRF, 1, nb(SRC_EAST), nb(SRC_ZERO)));  // A[1]
    put(1, enc(OP_ADD, OUT_BOTH, 2, rf(0), rf(1)));               // sum
    put(1, enc_exit());
    build_context();
    preload_context();
    b0 = $signed($urandom % 20001) - 10000; b1 = $signed($urandom % 20001) - 10000;
    c0 = $signed($urandom % 20001) - 10000; c1 = $signed($urandom % 20001) - 10000;
    host_write(B_ADDR, b0); host_write(B_ADDR + 4, b1);
    host_write(C_ADDR, c0); host_write(C_ADDR + 4, c1);
    counting = 1;
    run_kernel();
    counting = 0;
    check(dut.opr[1] == b0 * c0 + b1 * c1,
          $sformatf("sum = %0d, expected %0d", $signed(dut.opr[1]), b0 * c0 + b1 * c1));
    check(n_mem == 4,   $sformatf("%0d memory operations, expected 4", n_mem));
    check(n_store == 0, $sformatf("%0d stores, expected none", n_store));
    check(n_arith == 3, $sformatf("%0d arithmetic operations, expected 3", n_arith));
    check(n_mov == 2,   $sformatf("%0d moves, expected 2", n_mov));
    check(exec_cycles == 7, $sformatf("%0d cycles, expected 7", exec_cycles));
    check(stall_cycles == 0, $sformatf("%0d stall cycles, expected none", stall_cycles));
    $display("IPA: %0d memory, %0d arithmetic, %0d move operations in %0d cycles",
             n_mem, n_arith, n_mov, exec_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
