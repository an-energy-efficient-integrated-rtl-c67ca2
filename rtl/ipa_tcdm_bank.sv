// ipa_tcdm_bank: one word-wide bank of the tightly coupled data memory.
//
// A single-port array of WORDS 32-bit words. A request with `we` high writes
// `wdata` at the rising edge; a read returns the addressed word in the same
// cycle (asynchronous read), which lets a PE use loaded data in the very next
// instruction. In silicon the bank is an SRAM macro; the array stands in for
// it. Contents are not reset.
module ipa_tcdm_bank #(
  parameter int unsigned WORDS = 2048,
  localparam int unsigned AW = $clog2(WORDS)
) (
  input  logic          clk,
  input  logic          req,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [31:0]   wdata,
  output logic [31:0]   rdata
);
  logic [31:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (req && we) mem[addr] <= wdata;
  end

  assign rdata = mem[addr];
endmodule
