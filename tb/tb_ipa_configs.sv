// tb_ipa_configs: the memory-system exploration of the IPA - the number of
// load/store units (4, 8, 16) against the number of TCDM banks (4, 8, 16,
// 32), the twelve [#LSUs][#banks] points the architecture was evaluated at.
// Twelve complete IPAs are instantiated side by side, with the same program
// and data broadcast to all of them, and run the same kernel together.
//
// The kernel keeps four PEs with an LSU busy (PEs 0, 2, 5 and 7, which have
// an LSU in every configuration): in each of M iterations PE k loads
// x[32*i + S*k], adds a constant, and stores it to y[32*i + S*k], all four
// loads in one cycle and all four stores in another. With a stride of S = 8
// words the four accesses of a cycle fall into 1, 1, 2 or 4 distinct banks
// for 4, 8, 16 or 32 banks, so each iteration loses 6, 6, 2 or 0 cycles to
// the global stall. PE1 runs the loop. The test checks every result of
// every instance, and that each instance's stall and execution cycle counts
// equal 1 + 6*M + 1 plus the stalls predicted from the bank mapping (the
// largest number of same-bank requests in a cycle, minus one).
//
// The configuration points follow the architecture's exploration; the
// kernel, stride and sizes are this test's own.
`timescale 1ns/1ps
module tb_ipa_configs;
  import ipa_pkg::*;
  localparam int NCFG = 12;
  localparam int CFG_LSU  [NCFG] = '{4, 4, 4, 4, 8, 8, 8, 8, 16, 16, 16, 16};
  localparam int CFG_BANK [NCFG] = '{4, 8, 16, 32, 4, 8, 16, 32, 4, 8, 16, 32};
  localparam int M = 40, S = 8;
  localparam int X_BASE = 'h1000, Y_BASE = 'h4000;
  localparam int LSU_PE [4] = '{0, 2, 5, 7};

  logic        clk = 0, rst_n = 0;
  logic        gcm_we = 0;
  logic [9:0]  gcm_waddr = 0;
  logic [63:0] gcm_wdata = 0;
  logic        h_req = 0, h_we = 0;
  logic [31:0] h_addr = 0, h_wdata = 0;
  logic        start = 0;
  logic [9:0]  ctx_base = 0;

  logic        gnt_v   [NCFG];
  logic [31:0] rdata_v [NCFG];
  logic        done_v  [NCFG];
  logic [31:0] exec_v  [NCFG], stall_v [NCFG];
  logic        h_gnt;
  // the shared helpers also name these; instance 0 stands in for them
  logic [31:0] h_rdata;
  logic        done;
  assign h_rdata = rdata_v[0];
  assign done    = done_v[0];

  always_comb begin
    h_gnt = 1'b1;
    for (int c = 0; c < NCFG; c++) h_gnt &= gnt_v[c];
  end

  for (genvar c = 0; c < NCFG; c++) begin : g_cfg
    logic        busy, gstall;
    logic [31:0] cfg_cycles;
    logic [15:0] cg, nb_, used;
    ipa_top #(.N_LSU(CFG_LSU[c]), .N_BANKS(CFG_BANK[c])) dut (
      .clk, .rst_n, .gcm_we, .gcm_waddr, .gcm_wdata,
      .h_req, .h_we, .h_addr, .h_wdata, .h_gnt(gnt_v[c]), .h_rdata(rdata_v[c]),
      .start, .ctx_base, .busy, .done(done_v[c]),
      .cfg_cycles, .exec_cycles(exec_v[c]), .stall_cycles(stall_v[c]),
      .global_stall(gstall), .clockgate_en(cg), .nop_busy(nb_), .used);
  end

  always #5 clk = ~clk;

  `include "tb/ipa_tb_ctx.svh"

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (200_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic build();
    logic [19:0] nop1;
    nop1 = enc_nop(1);
    clear_programs();
    set_const(1, 0, 128 * (M - 1)); set_const(1, 1, 128);
    put(1, enc(OP_MOV, OUT_RRF, 1, nb(SRC_ZERO), nb(SRC_ZERO)));  // 0: r1 = 0
    put(1, enc(OP_LT,  OUT_NONE, 0, rf(1), crf(0)));              // 1: not last?
    put(1, nop1); put(1, nop1); put(1, nop1);                     // 2-4
    put(1, enc(OP_ADD, OUT_RRF, 1, rf(1), crf(1)));               // 5
    put(1, enc_cjmp(1, 7));                                       // 6
    put(1, enc_exit());                                           // 7
    for (int k = 0; k < 4; k++) begin
      int p;
      p = LSU_PE[k];
      set_const(p, 0, X_BASE + 4 * S * k); set_const(p, 1, 1000 * (k + 1));
      set_const(p, 2, Y_BASE + 4 * S * k); set_const(p, 3, 128);
      put(p, enc(OP_MOV, OUT_RRF, 1, nb(SRC_ZERO), nb(SRC_ZERO)));  // 0: r1 = 0
      put(p, enc(OP_LD,  OUT_RRF, 0, rf(1), crf(0)));               // 1: r0 = x[32i+S*k]
      put(p, enc(OP_ADD, OUT_RRF, 0, rf(0), crf(1)));               // 2: r0 += 1000(k+1)
      put(p, enc(OP_ADD, OUT_RRF, 2, rf(1), crf(2)));               // 3: r2 = &y[32i+S*k]
      put(p, enc(OP_ST,  OUT_NONE, 0, rf(0), rf(2)));               // 4
      put(p, enc(OP_ADD, OUT_RRF, 1, rf(1), crf(3)));               // 5: next row
      put(p, enc_cjmp(1, 7));                                       // 6
      put(p, enc_exit());                                           // 7
    end
    build_context();
  endtask

  // cycles lost to the global stall when the four PEs access base + 4*(32i + S*k)
  function automatic int lost(input int base, input int i, input int nbanks);
    int cnt [32];
    int worst;
    foreach (cnt[b]) cnt[b] = 0;
    for (int k = 0; k < 4; k++) cnt[(base / 4 + 32 * i + S * k) % nbanks]++;
    worst = 0;
    foreach (cnt[b]) if (cnt[b] > worst) worst = cnt[b];
    return worst - 1;
  endfunction

  logic [31:0] xv [32 * M];
  bit          seen [NCFG];

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    build();
    preload_context();
    for (int i = 0; i < M; i++)
      for (int k = 0; k < 4; k++) begin
        xv[32 * i + S * k] = $urandom % 100000;
        host_write(X_BASE + 4 * (32 * i + S * k), xv[32 * i + S * k]);
      end

    @(negedge clk); start = 1; ctx_base = 0;
    @(negedge clk); start = 0;
    foreach (seen[c]) seen[c] = 0;
    while (1) begin
      bit all;
      @(posedge clk);
      all = 1;
      for (int c = 0; c < NCFG; c++) begin
        if (done_v[c]) seen[c] = 1;
        all &= seen[c];
      end
      if (all) break;
    end
    @(negedge clk);

    for (int c = 0; c < NCFG; c++) begin
      int exp_stall;
      exp_stall = 0;
      for (int i = 0; i < M; i++)
        exp_stall += lost(X_BASE, i, CFG_BANK[c]) + lost(Y_BASE, i, CFG_BANK[c]);
      check(stall_v[c] == 32'(exp_stall), $sformatf("[%0d][%0d]: %0d stall cycles, expected %0d",
            CFG_LSU[c], CFG_BANK[c], stall_v[c], exp_stall));
      check(exec_v[c] == 32'(2 + 6 * M + exp_stall), $sformatf("[%0d][%0d]: %0d cycles, expected %0d",
            CFG_LSU[c], CFG_BANK[c], exec_v[c], 2 + 6 * M + exp_stall));
      $display("[%0d LSUs][%0d banks]: %0d cycles, %0d of them stalled",
               CFG_LSU[c], CFG_BANK[c], exec_v[c], stall_v[c]);
    end

    // read back y from every instance at once (the host is alone on the bus)
    for (int k = 0; k < 4; k++)
      for (int i = 0; i < M; i++) begin
        @(negedge clk);
        h_req = 1; h_we = 0; h_addr = Y_BASE + 4 * (32 * i + S * k);
        #1;
        for (int c = 0; c < NCFG; c++)
          check(gnt_v[c] && rdata_v[c] == xv[32 * i + S * k] + 32'(1000 * (k + 1)),
                $sformatf("[%0d][%0d]: y[%0d] = %0d, expected %0d", CFG_LSU[c], CFG_BANK[c],
                          32 * i + S * k, rdata_v[c], xv[32 * i + S * k] + 32'(1000 * (k + 1))));
      end
    @(negedge clk); h_req = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
