// ipa_log_xbar: logarithmic interconnect between the load/store units and the
// TCDM banks.
//
// N_MST masters (the PE load/store units and one host port) reach N_BANKS
// banks. Addresses are byte addresses of 32-bit words; word-level
// interleaving puts word w in bank (w mod N_BANKS) at row (w / N_BANKS), so
// consecutive words sit in different banks. Each bank grants one master per
// cycle; when several masters want the same bank a round-robin pointer per
// bank picks one, and the others see gnt low and must retry (in the IPA this
// raises the global stall). Grant and read data come back in the same cycle
// as the request. Interleaving follows the architecture; round-robin
// arbitration and the same-cycle answer are this implementation's choices.
module ipa_log_xbar #(
  parameter int unsigned N_MST   = 9,
  parameter int unsigned N_BANKS = 4,
  parameter int unsigned RAW     = 11,  // row address bits per bank
  localparam int unsigned BW = (N_BANKS > 1) ? $clog2(N_BANKS) : 1,
  localparam int unsigned MW = (N_MST > 1) ? $clog2(N_MST) : 1
) (
  input  logic           clk,
  input  logic           rst_n,
  // masters
  input  logic           m_req   [N_MST],
  input  logic           m_we    [N_MST],
  input  logic [31:0]    m_addr  [N_MST],
  input  logic [31:0]    m_wdata [N_MST],
  output logic           m_gnt   [N_MST],
  output logic [31:0]    m_rdata [N_MST],
  // banks
  output logic           b_req   [N_BANKS],
  output logic           b_we    [N_BANKS],
  output logic [RAW-1:0] b_addr  [N_BANKS],
  output logic [31:0]    b_wdata [N_BANKS],
  input  logic [31:0]    b_rdata [N_BANKS]
);
  logic [BW-1:0] m_bank [N_MST];
  logic [MW-1:0] rr     [N_BANKS];   // highest-priority master per bank
  logic [MW-1:0] win    [N_BANKS];

  for (genvar m = 0; m < int'(N_MST); m++) begin : g_dec
    if (N_BANKS > 1) begin : g_multi
      assign m_bank[m] = m_addr[m][2 +: BW];
    end else begin : g_single
      assign m_bank[m] = '0;
    end
  end

  always_comb begin
    for (int b = 0; b < int'(N_BANKS); b++) begin
      b_req[b]   = 1'b0;
      b_we[b]    = 1'b0;
      b_addr[b]  = '0;
      b_wdata[b] = '0;
      win[b]     = '0;
      // search from the round-robin pointer upwards, wrapping around
      for (int k = int'(N_MST) - 1; k >= 0; k--) begin
        logic [MW:0] m;
        m = {1'b0, rr[b]} + (MW+1)'(k);
        if (m >= (MW+1)'(N_MST)) m = m - (MW+1)'(N_MST);
        if (m_req[m[MW-1:0]] && int'(m_bank[m[MW-1:0]]) == b) begin
          b_req[b] = 1'b1;
          win[b]   = m[MW-1:0];
        end
      end
      if (b_req[b]) begin
        b_we[b]    = m_we[win[b]];
        b_addr[b]  = m_addr[win[b]][2 + $clog2(N_BANKS) +: RAW];
        b_wdata[b] = m_wdata[win[b]];
      end
    end
    for (int m = 0; m < int'(N_MST); m++) begin
      m_gnt[m]   = m_req[m] && b_req[m_bank[m]] && int'(win[m_bank[m]]) == m;
      m_rdata[m] = b_rdata[m_bank[m]];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int b = 0; b < int'(N_BANKS); b++) rr[b] <= '0;
    end else begin
      for (int b = 0; b < int'(N_BANKS); b++)
        if (b_req[b]) rr[b] <= (int'(win[b]) == int'(N_MST) - 1) ? '0 : win[b] + 1'b1;
    end
  end

  // at most one grant per bank
  for (genvar b = 0; b < int'(N_BANKS); b++) begin : g_chk
    logic [N_MST-1:0] hits;
    for (genvar m = 0; m < int'(N_MST); m++) begin : g_h
      assign hits[m] = m_gnt[m] && int'(m_bank[m]) == b;
    end
    a_one_gnt: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(hits));
  end
endmodule
