// tb_ipa_regfile: self-checking test of the register array used for the
// IRF, RRF and CRF. Random writes on both write ports against a shadow copy,
// both read ports checked every cycle, reset clears the contents.
`timescale 1ns/1ps
module tb_ipa_regfile;
  localparam int W = 32, D = 16;
  logic clk = 0, rst_n = 0;
  logic we = 0, we1 = 0;
  logic [3:0] waddr = 0, waddr1 = 0, raddr0 = 0, raddr1 = 0;
  logic [W-1:0] wdata = 0, wdata1 = 0, rdata0, rdata1;
  logic [W-1:0] shadow [D];
  int checks = 0, failures = 0;

  ipa_regfile #(.WIDTH(W), .DEPTH(D)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic [W-1:0] got, input logic [W-1:0] exp, input string s);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %h exp %h", s, got, exp); end
  endtask

  initial begin
    for (int i = 0; i < D; i++) shadow[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      // compare reads of the current state
      raddr0 = 4'($urandom); raddr1 = 4'($urandom);
      #1;
      chk(rdata0, shadow[raddr0], "rdata0");
      chk(rdata1, shadow[raddr1], "rdata1");
      we = 1'($urandom); we1 = 1'($urandom);
      waddr = 4'($urandom); waddr1 = 4'($urandom);
      wdata = $urandom; wdata1 = $urandom;
      @(posedge clk); #1;
      if (we) shadow[waddr] = wdata;
      if (we1) shadow[waddr1] = wdata1;
    end
    @(negedge clk); we = 0; we1 = 0;
    rst_n = 0; #1; rst_n = 1;
    for (int i = 0; i < D; i++) begin
      raddr0 = 4'(i); #1; chk(rdata0, '0, "after reset");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
