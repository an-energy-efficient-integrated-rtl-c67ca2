// tb_ipa_pe_ctrl: self-checking test of the PE sequencer. Random streams of
// sequential, jmp, cjmp and exit steps, with random enable, checked against
// a reference program counter kept in the testbench.
`timescale 1ns/1ps
module tb_ipa_pe_ctrl;
  logic clk = 0, rst_n = 0;
  logic start = 0, en = 0, is_jmp = 0, is_cjmp = 0, is_exit = 0, cond_any = 0;
  logic [4:0] tgt_true = 0, tgt_false = 0, pc;
  logic halted;
  int checks = 0, failures = 0;

  ipa_pe_ctrl #(.AW(5)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", s, $time); end
  endtask

  initial begin
    int unsigned rpc;
    bit rh;
    repeat (2) @(posedge clk);
    rst_n = 1;
    #1 chk(halted, "halted after reset");
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    rpc = 0; rh = 0;
    #1 chk(pc == 0 && !halted, "start");
    for (int n = 0; n < 3000; n++) begin
      int k;
      @(negedge clk);
      k = $urandom % 100;
      en = ($urandom % 4) != 0;
      is_jmp = (k >= 60 && k < 75); is_cjmp = (k >= 75 && k < 95); is_exit = (k >= 99);
      tgt_true = 5'($urandom); tgt_false = 5'($urandom); cond_any = 1'($urandom);
      @(posedge clk); #1;
      if (en && !rh) begin
        if (is_exit) rh = 1;
        else if (is_jmp) rpc = tgt_true;
        else if (is_cjmp) rpc = cond_any ? tgt_true : tgt_false;
        else rpc = (rpc + 1) % 32;
      end
      chk(pc == 5'(rpc) && halted == rh, $sformatf("pc %0d exp %0d halted %b exp %b", pc, rpc, halted, rh));
      if (rh && ($urandom % 8 == 0)) begin
        @(negedge clk); start = 1; en = 0; @(negedge clk); start = 0;
        rpc = 0; rh = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
