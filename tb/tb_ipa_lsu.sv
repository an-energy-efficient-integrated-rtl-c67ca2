// tb_ipa_lsu: self-checking test of the load/store unit. A small memory
// model answers requests; the test withholds grants for random numbers of
// cycles (driving the global stall from the LSU's own pending bit, as the
// array does) and also grants early while another unit keeps the stall up.
// It checks that each access reaches memory exactly once, that the load
// data handed to the PE is right, and that pending follows req & !gnt.
`timescale 1ns/1ps
module tb_ipa_lsu;
  logic clk = 0, rst_n = 0;
  logic issue = 0, is_ld = 0, is_st = 0, global_stall, gnt;
  logic [31:0] addr = 0, wdata = 0, mem_addr, mem_wdata, rdata, ld_data;
  logic req, we, pending;
  logic [31:0] mem [64];
  logic other_stall = 0, allow = 0;
  int accesses = 0;
  int checks = 0, failures = 0;

  ipa_lsu dut (.*);
  always #5 clk = ~clk;

  assign gnt          = req && allow;
  assign rdata        = mem[mem_addr[7:2]];
  assign global_stall = pending || other_stall;

  always @(posedge clk) if (req && gnt) begin
    accesses++;
    if (we) mem[mem_addr[7:2]] <= mem_wdata;
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

  logic [31:0] shadow [64];

  initial begin
    for (int i = 0; i < 64; i++) begin mem[i] = $urandom; shadow[i] = mem[i]; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      int wait_c, extra, n_before;
      bit ld;
      logic [5:0] w;
      ld = 1'($urandom); w = 6'($urandom);
      wait_c = $urandom % 3; extra = (n % 4 == 0) ? 1 + $urandom % 3 : 0;
      n_before = accesses;
      @(negedge clk);
      issue = 1; is_ld = ld; is_st = !ld; addr = {24'd0, w, 2'b00}; wdata = $urandom;
      allow = (wait_c == 0); other_stall = (extra > 0);
      // hold the instruction until it retires (no global stall at a clock edge)
      for (int c = 0; ; c++) begin
        #1;
        if (c < wait_c) chk(pending == 1'b1, "pending while not granted");
        if (!global_stall) begin
          if (ld) chk(ld_data == shadow[w], $sformatf("load data %h exp %h", ld_data, shadow[w]));
          break;
        end
        @(negedge clk);
        allow = (c + 1 >= wait_c);
        other_stall = (c + 1 < wait_c + extra);
      end
      @(posedge clk); #1;
      if (!ld) shadow[w] = wdata;
      chk(accesses == n_before + 1, $sformatf("accesses %0d, expected one", accesses - n_before));
      @(negedge clk);
      issue = 0; allow = 0; other_stall = 0;
      #1 chk(!req, "no request without issue");
    end
    for (int i = 0; i < 64; i++) chk(mem[i] == shadow[i], "final memory");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
