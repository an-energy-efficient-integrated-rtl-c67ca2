// tb_ipa_gcm: self-checking test of the global context memory (1024 x 64).
// Fills the whole memory, then reads it back in random order, checking the
// one-cycle read latency and that rdata holds between reads.
`timescale 1ns/1ps
module tb_ipa_gcm;
  logic clk = 0, we = 0, re = 0;
  logic [9:0] waddr = 0, raddr = 0;
  logic [63:0] wdata = 0, rdata;
  logic [63:0] shadow [1024];
  int checks = 0, failures = 0;

  ipa_gcm #(.WORDS(1024), .W(64)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  initial begin
    for (int i = 0; i < 1024; i++) begin
      @(negedge clk); we = 1; waddr = 10'(i); wdata = {$urandom, $urandom}; shadow[i] = wdata;
    end
    @(negedge clk); we = 0;
    for (int n = 0; n < 2000; n++) begin
      logic [9:0] a;
      a = 10'($urandom);
      @(negedge clk); re = 1; raddr = a;
      @(negedge clk); re = 0; raddr = 10'($urandom);
      chk(rdata == shadow[a], $sformatf("word %0d", a));
      @(negedge clk);
      chk(rdata == shadow[a], "rdata holds without re");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
