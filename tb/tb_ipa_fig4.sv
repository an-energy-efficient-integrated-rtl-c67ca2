// tb_ipa_fig4: the introductory example of the IPA, b[i] = a[i] + i for
// i = 0..3, fully unrolled over four PEs that each own a load/store unit.
// Every PE executes ld, add, st (12 instructions in all) and the kernel
// needs three cycles, plus the EXIT cycle. a[] sits at byte address 0 and b[]
// at 16, so the four loads and the four stores each hit four different banks
// and no stall occurs. Runs ipa_top at its default configuration.
`timescale 1ns/1ps
module tb_ipa_fig4;
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

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int active_instr = 0;
  always @(posedge clk) if (rst_n)
    for (int p = 0; p < 16; p++) if (clockgate_en[p]) active_instr++;

  localparam int PES [4] = '{0, 2, 5, 7};   // four PEs with load/store units
  logic [31:0] a [4], got;

  initial begin
    clear_programs();
    for (int k = 0; k < 4; k++) begin
      int p;
      p = PES[k];
      set_const(p, 0, 32'(4 * k));        // &a[k]
      set_const(p, 1, 32'(k));            // i
      set_const(p, 2, 32'(16 + 4 * k));   // &b[k]
      put(p, enc(OP_LD,  OUT_OPR, 0, crf(0), nb(SRC_ZERO)));
      put(p, enc(OP_ADD, OUT_OPR, 0, nb(SRC_OPR), crf(1)));
      put(p, enc(OP_ST,  OUT_NONE, 0, nb(SRC_OPR), crf(2)));
      put(p, enc_exit());
    end
    build_context();
    repeat (3) @(posedge clk);
    rst_n = 1;
    preload_context();
    for (int k = 0; k < 4; k++) begin
      a[k] = $urandom % 1000;
      host_write(32'(4 * k), a[k]);
    end
    active_instr = 0;
    run_kernel();
    for (int k = 0; k < 4; k++) begin
      host_read(32'(16 + 4 * k), got);
      check(got == a[k] + k, $sformatf("b[%0d] = %0d, expected %0d", k, got, a[k] + k));
    end
    check(exec_cycles == 4, $sformatf("kernel took %0d cycles, expected 3 + EXIT", exec_cycles));
    check(stall_cycles == 0, "no bank conflict expected");
    // 12 instructions plus 4 EXITs issued
    check(active_instr == 16, $sformatf("%0d instructions issued, expected 16", active_instr));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
