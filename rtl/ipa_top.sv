// ipa_top: the Integrated Programmable-Array accelerator (IPA).
//
// A ROWS x COLS array of processing elements (ipa_pea) executes complete
// kernels - loops, nested loops and branches - without help from a host
// processor. Data that stays inside the kernel lives in the PEs' registers
// and moves over the torus; only the kernel's input and output arrays go
// through the shared L1 memory (ipa_tcdm, N_BANKS banks, word-interleaved)
// which the PEs' load/store units reach over a logarithmic interconnect
// (ipa_log_xbar). A bank conflict stalls the whole array for a cycle. The
// programs ("contexts") sit in the global context memory (ipa_gcm) and are
// copied into the PEs by the IPA controller (ipa_ctrl) when the host starts a
// kernel.
//
// Host interface:
//   gcm_we/gcm_waddr/gcm_wdata   preload contexts (64-bit words)
//   h_req/h_we/h_addr/h_wdata    host access to the TCDM; h_gnt answers in
//   -> h_gnt/h_rdata             the same cycle, h_rdata is valid with h_gnt
//   start/ctx_base -> busy/done  run the kernel whose context begins at
//                                ctx_base; done pulses when all PEs exit
//   cfg_cycles/exec_cycles       context-load and execution cycle counts
//   stall_cycles                 cycles with the global stall raised
// The host port is the last master of the interconnect and competes with the
// PEs through the same round-robin arbitration.
//
// Defaults are the evaluated configuration: 4 x 4 PEs, 8 LSUs, 4 banks,
// 32 KB TCDM, 8 KB GCM.
module ipa_top
  import ipa_pkg::*;
#(
  parameter int unsigned ROWS       = 4,
  parameter int unsigned COLS       = 4,
  parameter int unsigned N_LSU      = 8,
  parameter int unsigned N_BANKS    = 4,
  parameter int unsigned TCDM_BYTES = 32768,
  parameter int unsigned GCM_BYTES  = 8192,
  localparam int unsigned NPE    = ROWS * COLS,
  localparam int unsigned GCM_AW = $clog2(GCM_BYTES / 8),
  localparam int unsigned RAW    = $clog2(TCDM_BYTES / 4 / N_BANKS)
) (
  input  logic              clk,
  input  logic              rst_n,
  // GCM preload
  input  logic              gcm_we,
  input  logic [GCM_AW-1:0] gcm_waddr,
  input  logic [63:0]       gcm_wdata,
  // host TCDM port
  input  logic              h_req,
  input  logic              h_we,
  input  logic [31:0]       h_addr,
  input  logic [31:0]       h_wdata,
  output logic              h_gnt,
  output logic [31:0]       h_rdata,
  // kernel control
  input  logic              start,
  input  logic [GCM_AW-1:0] ctx_base,
  output logic              busy,
  output logic              done,
  output logic [31:0]       cfg_cycles,
  output logic [31:0]       exec_cycles,
  output logic [31:0]       stall_cycles,
  // observability
  output logic              global_stall,
  output logic [NPE-1:0]    clockgate_en,
  output logic [NPE-1:0]    nop_busy,
  output logic [NPE-1:0]    used
);
  localparam int unsigned N_MST = N_LSU + 1;

  // GCM
  logic              gcm_re;
  logic [GCM_AW-1:0] gcm_raddr;
  logic [63:0]       gcm_rdata;

  ipa_gcm #(.WORDS(GCM_BYTES / 8), .W(64)) u_gcm (
    .clk, .we(gcm_we), .waddr(gcm_waddr), .wdata(gcm_wdata),
    .re(gcm_re), .raddr(gcm_raddr), .rdata(gcm_rdata));

  // controller
  logic [7:0]  cfg_pe;
  logic [1:0]  cfg_irf_we, cfg_crf_we;
  logic [4:0]  cfg_idx;
  logic [63:0] cfg_data;
  logic        pea_start, pea_done;

  ipa_ctrl #(.NPE(NPE), .GCM_AW(GCM_AW)) u_ctrl (
    .clk, .rst_n, .start, .ctx_base, .busy, .done, .cfg_cycles, .exec_cycles,
    .gcm_re, .gcm_raddr, .gcm_rdata,
    .cfg_pe, .cfg_irf_we, .cfg_crf_we, .cfg_idx, .cfg_data, .used, .pea_start, .pea_done);

  // PE array
  logic              lsu_req   [N_LSU];
  logic              lsu_we    [N_LSU];
  logic [31:0]       lsu_addr  [N_LSU];
  logic [31:0]       lsu_wdata [N_LSU];
  logic              lsu_gnt   [N_LSU];
  logic [31:0]       lsu_rdata [N_LSU];
  logic [NPE-1:0]    halted;
  logic [DATA_W-1:0] opr [NPE];

  ipa_pea #(.ROWS(ROWS), .COLS(COLS), .N_LSU(N_LSU)) u_pea (
    .clk, .rst_n, .cfg_pe, .cfg_irf_we, .cfg_crf_we, .cfg_idx, .cfg_data, .used,
    .start(pea_start), .done(pea_done), .global_stall, .clockgate_en, .nop_busy, .halted, .opr,
    .lsu_req, .lsu_we, .lsu_addr, .lsu_wdata, .lsu_gnt, .lsu_rdata);

  // interconnect: LSUs first, host last
  logic           m_req   [N_MST];
  logic           m_we    [N_MST];
  logic [31:0]    m_addr  [N_MST];
  logic [31:0]    m_wdata [N_MST];
  logic           m_gnt   [N_MST];
  logic [31:0]    m_rdata [N_MST];
  logic           b_req   [N_BANKS];
  logic           b_we    [N_BANKS];
  logic [RAW-1:0] b_addr  [N_BANKS];
  logic [31:0]    b_wdata [N_BANKS];
  logic [31:0]    b_rdata [N_BANKS];

  for (genvar l = 0; l < int'(N_LSU); l++) begin : g_m
    assign m_req[l]     = lsu_req[l];
    assign m_we[l]      = lsu_we[l];
    assign m_addr[l]    = lsu_addr[l];
    assign m_wdata[l]   = lsu_wdata[l];
    assign lsu_gnt[l]   = m_gnt[l];
    assign lsu_rdata[l] = m_rdata[l];
  end
  assign m_req[N_LSU]   = h_req;
  assign m_we[N_LSU]    = h_we;
  assign m_addr[N_LSU]  = h_addr;
  assign m_wdata[N_LSU] = h_wdata;
  assign h_gnt          = m_gnt[N_LSU];
  assign h_rdata        = m_rdata[N_LSU];

  ipa_log_xbar #(.N_MST(N_MST), .N_BANKS(N_BANKS), .RAW(RAW)) u_xbar (
    .clk, .rst_n, .m_req, .m_we, .m_addr, .m_wdata, .m_gnt, .m_rdata,
    .b_req, .b_we, .b_addr, .b_wdata, .b_rdata);

  ipa_tcdm #(.N_BANKS(N_BANKS), .SIZE_BYTES(TCDM_BYTES)) u_tcdm (
    .clk, .req(b_req), .we(b_we), .addr(b_addr), .wdata(b_wdata), .rdata(b_rdata));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                     stall_cycles <= '0;
    else if (pea_start)             stall_cycles <= '0;
    else if (busy && global_stall)  stall_cycles <= stall_cycles + 1;
  end
endmodule
