// tb_ipa_ctrl: self-checking test of the IPA controller (context loader and
// kernel sequencer). A GCM model with a one-cycle read answers the
// controller; the test records every write on the context bus and compares
// it with the random contexts it placed in the GCM (odd and even counts,
// segments without constants, a context that does not start at word 0). It
// checks the used-PE mask, a single start pulse after loading, the load
// cycle count (words + 1), busy, and that done follows the array's done.
`timescale 1ns/1ps
module tb_ipa_ctrl;
  localparam int NPE = 16;
  logic clk = 0, rst_n = 0;
  logic start = 0;
  logic [9:0] ctx_base = 0;
  logic busy, done;
  logic [31:0] cfg_cycles, exec_cycles;
  logic gcm_re;
  logic [9:0] gcm_raddr;
  logic [63:0] gcm_rdata;
  logic [7:0] cfg_pe;
  logic [1:0] cfg_irf_we, cfg_crf_we;
  logic [4:0] cfg_idx;
  logic [63:0] cfg_data;
  logic [NPE-1:0] used;
  logic pea_start, pea_done = 0;
  logic [63:0] gcm [1024];
  int checks = 0, failures = 0;

  ipa_ctrl #(.NPE(NPE), .GCM_AW(10)) dut (.*);
  always #5 clk = ~clk;

  always @(posedge clk) if (gcm_re) gcm_rdata <= gcm[gcm_raddr];

  // what arrived over the context bus
  logic [19:0] irf [NPE][32];
  logic [31:0] crf [NPE][16];
  int n_start = 0;
  always @(posedge clk) begin
    if (cfg_irf_we[0]) irf[cfg_pe][cfg_idx]     <= cfg_data[19:0];
    if (cfg_irf_we[1]) irf[cfg_pe][cfg_idx + 1] <= cfg_data[51:32];
    if (cfg_crf_we[0]) crf[cfg_pe][cfg_idx]     <= cfg_data[31:0];
    if (cfg_crf_we[1]) crf[cfg_pe][cfg_idx + 1] <= cfg_data[63:32];
    if (pea_start) n_start++;
  end

  initial begin
    repeat (20000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  logic [19:0] eprog [NPE][32];
  logic [31:0] econs [NPE][16];
  int eni [NPE], enc_ [NPE];

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int run = 0; run < 6; run++) begin
      int w, base, exp_words, run_len, cyc;
      logic [NPE-1:0] exp_used;
      base = 37 * run; w = base; exp_used = '0;
      for (int p = 0; p < NPE; p++) begin
        for (int k = 0; k < 32; k++) irf[p][k] = '0;
        for (int k = 0; k < 16; k++) crf[p][k] = '0;
        eni[p] = 0; enc_[p] = 0;
        if ($urandom % 3 == 0) continue;
        exp_used[p] = 1;
        eni[p] = 1 + $urandom % 32; enc_[p] = $urandom % 17;
        for (int k = 0; k < eni[p]; k++) eprog[p][k] = 20'($urandom);
        for (int k = 0; k < enc_[p]; k++) econs[p][k] = $urandom;
        gcm[w++] = {4'h1, 8'(p), 6'd0, 6'(eni[p]), 3'd0, 5'(enc_[p]), 32'($urandom)};
        for (int k = 0; k < eni[p]; k += 2)
          gcm[w++] = {12'd0, (k + 1 < eni[p]) ? eprog[p][k+1] : 20'($urandom | 1), 12'd0, eprog[p][k]};
        for (int k = 0; k < enc_[p]; k += 2)
          gcm[w++] = {(k + 1 < enc_[p]) ? econs[p][k+1] : ($urandom | 1), econs[p][k]};
      end
      gcm[w++] = {4'hF, 60'd0};
      exp_words = w - base;
      n_start = 0;
      @(negedge clk); start = 1; ctx_base = 10'(base);
      @(negedge clk); start = 0;
      chk(busy, "busy");
      cyc = 0;
      while (!pea_start) begin @(negedge clk); cyc++; if (cyc > 2000) break; end
      run_len = 3 + $urandom % 20;
      repeat (run_len) @(negedge clk);
      pea_done = 1;
      @(negedge clk); pea_done = 0;
      chk(done, "done pulse");
      @(negedge clk);
      chk(!done && !busy, "idle again");
      chk(n_start == 1, $sformatf("%0d start pulses", n_start));
      chk(used == exp_used, $sformatf("used %h exp %h", used, exp_used));
      chk(cfg_cycles == 32'(exp_words + 1), $sformatf("cfg cycles %0d exp %0d", cfg_cycles, exp_words + 1));
      chk(exec_cycles == 32'(run_len - 1), $sformatf("exec cycles %0d exp %0d", exec_cycles, run_len - 1));
      for (int p = 0; p < NPE; p++) begin
        for (int k = 0; k < eni[p]; k++) chk(irf[p][k] == eprog[p][k], $sformatf("run %0d PE%0d instr %0d", run, p, k));
        for (int k = eni[p]; k < 32; k++) chk(irf[p][k] == '0, "no write past the program");
        for (int k = 0; k < enc_[p]; k++) chk(crf[p][k] == econs[p][k], $sformatf("PE%0d const %0d", p, k));
        for (int k = enc_[p]; k < 16; k++) chk(crf[p][k] == '0, "no write past the constants");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
