// ipa_gcm: global context memory holding the programs (contexts) of the PEs.
//
// WORDS x W bits (default 1024 x 64 = 8 KB), one write port for the host that
// preloads contexts and one synchronous read port for the IPA controller:
// the word addressed with `re` high appears on `rdata` after the next rising
// edge and stays there until the next read. The 8 KB size follows the
// architecture; the 64-bit width is this implementation's choice, made so
// that the context loader moves 8 bytes per cycle. In silicon this is an
// SRAM macro.
module ipa_gcm #(
  parameter int unsigned WORDS = 1024,
  parameter int unsigned W     = 64,
  localparam int unsigned AW = $clog2(WORDS)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [W-1:0]  wdata,
  input  logic          re,
  input  logic [AW-1:0] raddr,
  output logic [W-1:0]  rdata
);
  logic [W-1:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end
endmodule
