// tb_ipa_tcdm: self-checking test of the banked TCDM (4 banks, 32 KB).
// Random parallel writes and reads on all bank ports against a shadow copy,
// including the first and last row of every bank.
`timescale 1ns/1ps
module tb_ipa_tcdm;
  localparam int NB = 4, SZ = 32768, WPB = SZ / 4 / NB, RAW = $clog2(WPB);
  logic clk = 0;
  logic req [NB], we [NB];
  logic [RAW-1:0] addr [NB];
  logic [31:0] wdata [NB], rdata [NB];
  logic [31:0] shadow [NB][WPB];
  bit valid [NB][WPB];
  int checks = 0, failures = 0;

  ipa_tcdm #(.N_BANKS(NB), .SIZE_BYTES(SZ)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int b = 0; b < NB; b++) begin req[b] = 0; we[b] = 0; addr[b] = 0; wdata[b] = 0; end
    // write the edges of every bank first
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      for (int b = 0; b < NB; b++) begin
        req[b]  = 1;
        addr[b] = (n < 2) ? RAW'(n == 0 ? 0 : WPB - 1) : RAW'($urandom % 64 + ((n % 2) ? WPB - 64 : 0));
        we[b]   = (n < 2) ? 1'b1 : 1'($urandom);
        wdata[b] = $urandom;
      end
      #1;
      for (int b = 0; b < NB; b++) if (!we[b] && valid[b][addr[b]]) begin
        checks++;
        if (rdata[b] !== shadow[b][addr[b]]) begin
          failures++;
          $display("FAIL bank %0d row %0d read %h exp %h", b, addr[b], rdata[b], shadow[b][addr[b]]);
        end
      end
      @(posedge clk); #1;
      for (int b = 0; b < NB; b++) if (we[b]) begin
        shadow[b][addr[b]] = wdata[b]; valid[b][addr[b]] = 1;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
