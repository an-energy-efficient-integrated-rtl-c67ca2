// tb_ipa_kernels: two more of the kernel types the IPA targets, run on the
// full design at its default configuration, each checked for its results
// and its exact cycle count.
//
// gcd (one loop containing one if/else, the control-dominated kind): a
// single PE with an LSU loads a and b, then loops "while a != b: if a > b
// a -= b else b -= a" with two cjmps per iteration, and stores the result.
// The kernel is started 20 times with new random operands, which also
// exercises restarting the controller. Execution takes 6 + 6 x (number of
// subtract steps) cycles.
//
// FIR (4 taps, y[n] = sum h[k] x[n+k], 64 outputs): the four checkerboard
// PEs 0, 2, 5 and 7 each load one of x[n..n+3] in the same cycle and
// multiply it by their tap, held in the constant register file. Because the
// four words are consecutive they fall into four different banks, so the
// loads never stall. PE1 and PE6 add pairs of products from their west and
// east neighbours, PE5 adds the two partial sums from its north and east
// neighbours and stores y[n] at an address PE1 passes down through its
// output register. PE1 also ends the loop, by comparing that address with
// the last one. 6 cycles per output.
//
// The kernels are from the architecture's benchmark list; their sizes (20
// gcd operand pairs, 4 taps, 64 outputs) and the hand-written mappings are
// this test's own.
`timescale 1ns/1ps
module tb_ipa_kernels;
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
    repeat (500_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- gcd ----------------
  localparam int GA = 'h100, GB = 'h104, GR = 'h108;

  task automatic build_gcd();
    clear_programs();
    set_const(0, 0, GA); set_const(0, 1, GB); set_const(0, 2, GR);
    put(0, enc(OP_LD,  OUT_RRF,  0, crf(0), nb(SRC_ZERO)));  // 0: a
    put(0, enc(OP_LD,  OUT_RRF,  1, crf(1), nb(SRC_ZERO)));  // 1: b
    put(0, enc(OP_NE,  OUT_NONE, 0, rf(0), rf(1)));          // 2: a != b ?
    put(0, enc_cjmp(4, 10));                                 // 3
    put(0, enc(OP_LT,  OUT_NONE, 0, rf(1), rf(0)));          // 4: a > b ?
    put(0, enc_cjmp(6, 8));                                  // 5
    put(0, enc(OP_SUB, OUT_RRF,  0, rf(0), rf(1)));          // 6: a -= b
    put(0, enc_jmp(2));                                      // 7
    put(0, enc(OP_SUB, OUT_RRF,  1, rf(1), rf(0)));          // 8: b -= a
    put(0, enc_jmp(2));                                      // 9
    put(0, enc(OP_ST,  OUT_NONE, 0, rf(0), crf(2)));         // 10: store a
    put(0, enc_exit());                                      // 11
    build_context();
  endtask

  // ---------------- FIR ----------------
  localparam int X_BASE = 'h1000, Y_BASE = 'h2000, NOUT = 64, TAPS = 4;
  localparam int TAP_PE [TAPS] = '{0, 2, 5, 7};
  logic signed [31:0] h [TAPS];

  task automatic build_fir();
    logic [19:0] nop1;
    nop1 = enc_nop(1);
    clear_programs();
    // PE1: output pointer r1, which also ends the loop
    set_const(1, 0, Y_BASE + 4 * (NOUT - 1)); set_const(1, 2, Y_BASE); set_const(1, 3, 4);
    put(1, enc(OP_MOV, OUT_RRF, 1, crf(2), nb(SRC_ZERO)));        // 0: r1 = &y[0]
    put(1, enc(OP_LT,  OUT_NONE, 0, rf(1), crf(0)));              // 1: not the last y?
    put(1, nop1);                                                 // 2
    put(1, enc(OP_ADD, OUT_OPR, 0, nb(SRC_WEST), nb(SRC_EAST)));  // 3: p0 + p1
    put(1, enc(OP_MOV, OUT_OPR, 0, rf(1), nb(SRC_ZERO)));         // 4: pass &y[n] south
    put(1, enc(OP_ADD, OUT_RRF, 1, rf(1), crf(3)));               // 5
    put(1, enc_cjmp(1, 7));                                       // 6
    put(1, enc_exit());                                           // 7
    // PE6: p2 + p3
    for (int s = 0; s < 8; s++)
      put(6, s == 3 ? enc(OP_ADD, OUT_OPR, 0, nb(SRC_WEST), nb(SRC_EAST)) :
             s == 6 ? enc_cjmp(1, 7) : s == 7 ? enc_exit() : nop1);
    // tap PEs: r1 = 4n, load x[n+k], multiply by h[k]
    for (int k = 0; k < TAPS; k++) begin
      int p;
      p = TAP_PE[k];
      set_const(p, 0, X_BASE + 4 * k); set_const(p, 1, h[k]); set_const(p, 2, 4);
      put(p, enc(OP_MOV, OUT_RRF, 1, nb(SRC_ZERO), nb(SRC_ZERO)));  // 0
      put(p, enc(OP_LD,  OUT_RRF, 0, rf(1), crf(0)));               // 1
      put(p, enc(OP_MUL, OUT_OPR, 0, rf(0), crf(1)));               // 2
      put(p, enc(OP_ADD, OUT_RRF, 1, rf(1), crf(2)));               // 3
      if (p == 5) begin
        put(p, enc(OP_ADD, OUT_RRF, 2, nb(SRC_NORTH), nb(SRC_EAST)));  // 4: y[n]
        put(p, enc(OP_ST,  OUT_NONE, 0, rf(2), nb(SRC_NORTH)));        // 5
      end else begin
        put(p, nop1); put(p, nop1);
      end
      put(p, enc_cjmp(1, 7));                                       // 6
      put(p, enc_exit());                                           // 7
    end
    build_context();
  endtask

  initial begin
    logic [31:0] got;
    repeat (3) @(posedge clk);
    rst_n = 1;

    build_gcd();
    preload_context();
    for (int t = 0; t < 20; t++) begin
      int a, b, x, y, steps;
      a = 1 + $urandom % 300; b = 1 + $urandom % 300;
      if (t == 0) begin a = 7; b = 7; end
      host_write(GA, a); host_write(GB, b);
      x = a; y = b; steps = 0;
      while (x != y) begin
        if (x > y) x -= y; else y -= x;
        steps++;
      end
      run_kernel();
      host_read(GR, got);
      check(got == 32'(x), $sformatf("gcd(%0d,%0d) = %0d, expected %0d", a, b, got, x));
      check(exec_cycles == 32'(6 + 6 * steps),
            $sformatf("gcd(%0d,%0d): %0d cycles, expected %0d", a, b, exec_cycles, 6 + 6 * steps));
      check(stall_cycles == 0, "gcd stalled");
    end

    for (int k = 0; k < TAPS; k++) h[k] = $signed($urandom % 201) - 100;
    build_fir();
    preload_context();
    for (int i = 0; i < NOUT + TAPS - 1; i++) host_write(X_BASE + 4 * i, $signed($urandom % 2001) - 1000);
    run_kernel();
    for (int n = 0; n < NOUT; n++) begin
      logic signed [31:0] acc, xv;
      acc = 0;
      for (int k = 0; k < TAPS; k++) begin
        host_read(X_BASE + 4 * (n + k), xv);
        acc += h[k] * xv;
      end
      host_read(Y_BASE + 4 * n, got);
      check(got == acc, $sformatf("y[%0d] = %0d, expected %0d", n, $signed(got), acc));
    end
    check(exec_cycles == 32'(2 + 6 * NOUT), $sformatf("FIR: %0d cycles, expected %0d", exec_cycles, 2 + 6 * NOUT));
    check(stall_cycles == 0, $sformatf("FIR: %0d stall cycles, expected none", stall_cycles));
    $display("FIR %0d taps x %0d outputs: context %0d cycles, execution %0d cycles, %0d stalls",
             TAPS, NOUT, cfg_cycles, exec_cycles, stall_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
