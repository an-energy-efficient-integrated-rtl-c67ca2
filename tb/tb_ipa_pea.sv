// tb_ipa_pea: self-checking test of the 4 x 4 PE array with 8 LSUs.
// Every used PE puts a distinct value on its output register and copies the
// values of its four torus neighbours into its registers (checking the
// wrap-around links). PE 5 alone evaluates a condition and its CR steers the
// cjmp of all PEs. Each PE with an LSU then stores its value; the memory
// model grants one request per cycle, so the array sees a run of global
// stall cycles. PE 15 is left unused: it must stay clock-gated and its
// neighbours must read 0 from it. The cycle count to `done` is checked.
`timescale 1ns/1ps
module tb_ipa_pea;
  import ipa_pkg::*;
  localparam int R = 4, C = 4, NPE = 16, NL = 8;
  logic clk = 0, rst_n = 0;
  logic [7:0] cfg_pe = 0;
  logic [1:0] cfg_irf_we = 0, cfg_crf_we = 0;
  logic [4:0] cfg_idx = 0;
  logic [63:0] cfg_data = 0;
  logic [NPE-1:0] used = 0;
  logic start = 0, done, global_stall;
  logic [NPE-1:0] clockgate_en, nop_busy, halted;
  logic [31:0] opr [NPE];
  logic lsu_req [NL], lsu_we [NL], lsu_gnt [NL];
  logic [31:0] lsu_addr [NL], lsu_wdata [NL], lsu_rdata [NL];
  logic [31:0] mem [64];
  int checks = 0, failures = 0;

  ipa_pea #(.ROWS(R), .COLS(C), .N_LSU(NL)) dut (.*);
  always #5 clk = ~clk;

  // single-port memory model: lowest requesting port wins
  always_comb begin
    bit taken;
    taken = 0;
    for (int l = 0; l < NL; l++) begin
      lsu_gnt[l]   = lsu_req[l] && !taken;
      if (lsu_req[l]) taken = 1;
      lsu_rdata[l] = mem[lsu_addr[l][7:2]];
    end
  end
  always @(posedge clk)
    for (int l = 0; l < NL; l++)
      if (lsu_req[l] && lsu_gnt[l] && lsu_we[l]) mem[lsu_addr[l][7:2]] <= lsu_wdata[l];

  initial begin
    repeat (5000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  function automatic bit lsu_pe(int p); return ((p / C) + (p % C)) % 2 == 0; endfunction
  function automatic logic [31:0] val(int p); return 32'(1000 + 17 * p); endfunction
  function automatic int wrap(int r, int c); return ((r + R) % R) * C + (c + C) % C; endfunction

  logic [19:0] prog [10];
  logic [31:0] rrf [NPE][5];
  for (genvar g = 0; g < NPE; g++) begin : g_peek
    for (genvar k = 0; k < 5; k++) begin : g_k
      assign rrf[g][k] = dut.g_pe[g].u_pe.u_rrf.mem[k];
    end
  end
  int n_stall = 0, unused_on = 0;
  always @(posedge clk) begin
    if (global_stall) n_stall++;
    if (clockgate_en[15]) unused_on++;
  end

  initial begin
    int cycles, nlsu, slot;
    for (int i = 0; i < 64; i++) mem[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    nlsu = 0;
    for (int p = 0; p < NPE; p++) begin
      prog[0] = enc(OP_MOV, OUT_OPR, 0, crf(0), nb(SRC_ZERO));
      prog[1] = enc(OP_MOV, OUT_RRF, 0, nb(SRC_NORTH), nb(SRC_ZERO));
      prog[2] = enc(OP_MOV, OUT_RRF, 1, nb(SRC_EAST), nb(SRC_ZERO));
      prog[3] = enc(OP_MOV, OUT_RRF, 2, nb(SRC_SOUTH), nb(SRC_ZERO));
      prog[4] = enc(OP_MOV, OUT_RRF, 3, nb(SRC_WEST), nb(SRC_ZERO));
      prog[5] = (p == 5) ? enc(OP_LT, OUT_NONE, 0, crf(1), crf(2)) : enc_nop(1);
      prog[6] = enc_cjmp(7, 8);
      prog[7] = enc(OP_MOV, OUT_RRF, 4, crf(3), nb(SRC_ZERO));
      prog[8] = lsu_pe(p) ? enc(OP_ST, OUT_NONE, 0, nb(SRC_OPR), crf(4)) : enc_nop(1);
      prog[9] = enc_exit();
      for (int k = 0; k < 10; k += 2) begin
        @(negedge clk);
        cfg_pe = 8'(p); cfg_irf_we = 2'b11; cfg_crf_we = 0; cfg_idx = 5'(k);
        cfg_data = {12'd0, prog[k+1], 12'd0, prog[k]};
      end
      @(negedge clk);
      cfg_irf_we = 0; cfg_crf_we = 2'b11; cfg_idx = 0; cfg_data = {32'd3, val(p)};
      @(negedge clk);
      cfg_idx = 2; cfg_data = {32'd77, 32'd9};                // c2 = 9, c3 = 77
      @(negedge clk);
      cfg_idx = 4; cfg_data = {32'd0, 32'(4 * p)};             // c4 = store address
      @(negedge clk); cfg_crf_we = 0;
    end
    used = 16'h7FFF;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    cycles = 0;
    while (!done) begin @(negedge clk); cycles++; if (cycles > 100) break; end
    for (int p = 0; p < 15; p++) begin
      automatic int r = p / C;
      automatic int c = p % C;
      automatic int pn = wrap(r - 1, c);
      automatic int pe_ = wrap(r, c + 1);
      automatic int ps = wrap(r + 1, c);
      automatic int pw = wrap(r, c - 1);
      chk(rrf[p][0] == (pn == 15 ? 0 : val(pn)), $sformatf("PE%0d north", p));
      chk(rrf[p][1] == (pe_ == 15 ? 0 : val(pe_)), $sformatf("PE%0d east", p));
      chk(rrf[p][2] == (ps == 15 ? 0 : val(ps)), $sformatf("PE%0d south", p));
      chk(rrf[p][3] == (pw == 15 ? 0 : val(pw)), $sformatf("PE%0d west", p));
      chk(rrf[p][4] == 77, $sformatf("PE%0d took the cjmp true path", p));
      if (lsu_pe(p)) chk(mem[p] == val(p), $sformatf("PE%0d store", p));
    end
    chk(mem[15] == 0, "unused PE stored nothing");
    chk(opr[15] == 0, "unused PE output stays 0");
    chk(unused_on == 0, "unused PE clocked");
    chk(n_stall == 6, $sformatf("stall cycles %0d, expected 6", n_stall));
    // 10 instructions + 6 stall cycles
    chk(cycles == 16, $sformatf("%0d cycles to done, expected 16", cycles));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
