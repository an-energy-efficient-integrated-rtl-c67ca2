// tb_ipa_log_xbar: self-checking test of the logarithmic interconnect with
// 9 masters and 4 banks (the default IPA configuration plus host port).
// Random requests each cycle; checks the word-interleaved bank and row
// mapping, one grant per bank, that the granted master is the first
// requester at or after the bank's round-robin pointer (kept by a reference
// model here), that every request is eventually granted (fairness) and that
// read data and writes reach the right bank.
`timescale 1ns/1ps
module tb_ipa_log_xbar;
  localparam int NM = 9, NB = 4, RAW = 11;
  logic clk = 0, rst_n = 0;
  logic m_req [NM], m_we [NM], m_gnt [NM];
  logic [31:0] m_addr [NM], m_wdata [NM], m_rdata [NM];
  logic b_req [NB], b_we [NB];
  logic [RAW-1:0] b_addr [NB];
  logic [31:0] b_wdata [NB], b_rdata [NB];
  int checks = 0, failures = 0;

  ipa_log_xbar #(.N_MST(NM), .N_BANKS(NB), .RAW(RAW)) dut (.*);
  always #5 clk = ~clk;

  // bank models: read data = a function of bank and row
  for (genvar b = 0; b < NB; b++) begin : g_b
    assign b_rdata[b] = 32'(b * 65536) + 32'(b_addr[b]);
  end

  initial begin
    repeat (20000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", s, $time); end
  endtask

  int rr [NB];
  int waiting [NM];

  initial begin
    for (int b = 0; b < NB; b++) rr[b] = 0;
    for (int m = 0; m < NM; m++) begin waiting[m] = 0; m_req[m] = 0; m_we[m] = 0; m_addr[m] = 0; m_wdata[m] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      for (int m = 0; m < NM; m++) begin
        // a master that was not granted keeps its request
        if (!(m_req[m] && waiting[m] > 0)) begin
          m_req[m]   = ($urandom % 3) != 0;
          m_we[m]    = 1'($urandom);
          m_addr[m]  = {17'd0, 13'($urandom), 2'b00};
          m_wdata[m] = $urandom;
        end
      end
      #1;
      for (int b = 0; b < NB; b++) begin
        int exp_w, ngnt;
        exp_w = -1; ngnt = 0;
        for (int k = 0; k < NM; k++) begin
          int m;
          m = (rr[b] + k) % NM;
          if (exp_w < 0 && m_req[m] && int'(m_addr[m][3:2]) == b) exp_w = m;
        end
        for (int m = 0; m < NM; m++) if (m_gnt[m] && int'(m_addr[m][3:2]) == b) ngnt++;
        chk(ngnt == (exp_w >= 0 ? 1 : 0), $sformatf("bank %0d grants %0d", b, ngnt));
        if (exp_w >= 0) begin
          chk(m_gnt[exp_w], $sformatf("bank %0d should grant master %0d", b, exp_w));
          chk(b_req[b] && b_we[b] == m_we[exp_w] && b_addr[b] == m_addr[exp_w][14:4] &&
              b_wdata[b] == m_wdata[exp_w], $sformatf("bank %0d request fields", b));
          rr[b] = (exp_w + 1) % NM;
        end else begin
          chk(!b_req[b], "idle bank");
        end
      end
      for (int m = 0; m < NM; m++) begin
        if (m_req[m] && m_gnt[m]) begin
          chk(m_rdata[m] == 32'(int'(m_addr[m][3:2]) * 65536) + 32'(m_addr[m][14:4]), "read data");
          waiting[m] = 0;
        end else if (m_req[m]) begin
          waiting[m]++;
          chk(waiting[m] < NM + 1, $sformatf("master %0d starved", m));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
