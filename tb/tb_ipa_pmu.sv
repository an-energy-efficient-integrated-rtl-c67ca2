// tb_ipa_pmu: self-checking test of the power management unit. Checks the
// gating of unused and halted PEs, that "NOP n" gates the PE for exactly
// n-1 cycles after the issue cycle, and that a global stall freezes the
// counter (the NOP then lasts n cycles plus the stall cycles).
`timescale 1ns/1ps
module tb_ipa_pmu;
  logic clk = 0, rst_n = 0;
  logic clear = 0, used = 0, halted = 0, global_stall = 0, nop_load = 0;
  logic [14:0] nop_count = 0;
  logic issue, clockgate_en, nop_busy;
  int checks = 0, failures = 0;

  ipa_pmu #(.CNT_W(15)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", s, $time); end
  endtask

  // issue NOP n, optionally with a stall of `st` cycles starting `at` cycles
  // after the issue; returns the number of cycles until the PE runs again
  task automatic run_nop(input int n, input int at, input int st, output int cycles);
    @(negedge clk);
    nop_load = 1; nop_count = 15'(n);
    #1 chk(clockgate_en, "enabled in NOP issue cycle");
    @(negedge clk); nop_load = 0;
    cycles = 1;
    while (!clockgate_en || global_stall) begin
      if (cycles == at) global_stall = 1;
      if (cycles == at + st) global_stall = 0;
      #1;
      if (!clockgate_en || global_stall) begin
        @(negedge clk);
        cycles++;
        if (cycles > 500) break;
      end
    end
    global_stall = 0;
  endtask

  initial begin
    int c;
    repeat (2) @(posedge clk);
    rst_n = 1;
    #1 chk(!clockgate_en && !issue, "unused PE is gated");
    used = 1; #1 chk(clockgate_en, "used PE runs");
    halted = 1; #1 chk(!clockgate_en, "halted PE is gated");
    halted = 0;
    global_stall = 1; #1 chk(!clockgate_en && issue, "stall gates but keeps issue");
    global_stall = 0;
    for (int n = 1; n <= 6; n++) begin
      run_nop(n, 1000, 0, c);
      chk(c == n, $sformatf("NOP %0d lasted %0d cycles", n, c));
    end
    for (int n = 3; n <= 6; n++) begin
      run_nop(n, 1, 3, c);
      chk(c == n + 3, $sformatf("NOP %0d with 3 stall cycles lasted %0d cycles", n, c));
    end
    // clear aborts a running NOP
    @(negedge clk); nop_load = 1; nop_count = 15'd9;
    @(negedge clk); nop_load = 0; #1 chk(nop_busy, "counter busy");
    clear = 1; @(negedge clk); clear = 0; #1 chk(!nop_busy && clockgate_en, "clear empties the counter");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
