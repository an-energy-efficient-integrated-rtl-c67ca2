// ipa_tcdm: the tightly coupled data memory (L1) of the IPA, N_BANKS banks.
//
// SIZE_BYTES of storage split evenly over N_BANKS single-port banks
// (ipa_tcdm_bank), one port per bank, so N_BANKS different words can be
// accessed in one cycle. The logarithmic interconnect in front of it does the
// word-level interleaving and hands each bank a row address. Writes land at
// the clock edge, reads answer in the same cycle. The default (32 KB, 4 banks)
// is the configuration the architecture settles on.
module ipa_tcdm #(
  parameter int unsigned N_BANKS    = 4,
  parameter int unsigned SIZE_BYTES = 32768,
  localparam int unsigned WORDS_PER_BANK = SIZE_BYTES / 4 / N_BANKS,
  localparam int unsigned RAW = $clog2(WORDS_PER_BANK)
) (
  input  logic           clk,
  input  logic           req   [N_BANKS],
  input  logic           we    [N_BANKS],
  input  logic [RAW-1:0] addr  [N_BANKS],
  input  logic [31:0]    wdata [N_BANKS],
  output logic [31:0]    rdata [N_BANKS]
);
  for (genvar b = 0; b < int'(N_BANKS); b++) begin : g_bank
    ipa_tcdm_bank #(.WORDS(WORDS_PER_BANK)) u_bank (
      .clk, .req(req[b]), .we(we[b]), .addr(addr[b]), .wdata(wdata[b]), .rdata(rdata[b]));
  end
endmodule
