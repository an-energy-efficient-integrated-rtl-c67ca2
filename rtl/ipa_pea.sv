// ipa_pea: the processing-element array (PEA) of the IPA.
//
// ROWS x COLS processing elements on a two-dimensional torus: each PE reads
// the output register of its north, east, south and west neighbour, with
// the edges wrapped around. PE index p = row*COLS + col. All PEs run in
// lock-step; three array-wide signals keep them so:
//   * cond_any     - OR of every PE's condition register; steers cjmp.
//   * global_stall - OR of every load/store unit's ungranted request. While
//                    it is high every PE is clock-gated and repeats its
//                    instruction; the load/store units keep running.
//   * start        - begins the loaded kernel in every used PE at address 0.
// N_LSU of the PEs carry a load/store unit with a port towards the TCDM
// interconnect. They are placed on the checkerboard first - the PEs with
// (row + col) even, 8 of 16 in the 4 x 4 array, so with the default N_LSU = 8
// every PE has a neighbour with memory access - then on the remaining PEs in
// index order (N_LSU = 16 puts one in every PE; N_LSU = 4 uses PEs 0, 2, 5
// and 7). LSU port l belongs to the l-th PE with an LSU in index order. `done` is high when every used PE has halted.
//
// The torus, the MIMD lock-step execution, the optional LSUs, the OR of the
// condition bits and the broadcast global stall follow the architecture;
// the LSU placement is this implementation's choice.
module ipa_pea
  import ipa_pkg::*;
#(
  parameter int unsigned ROWS  = 4,
  parameter int unsigned COLS  = 4,
  parameter int unsigned N_LSU = 8,
  localparam int unsigned NPE  = ROWS * COLS
) (
  input  logic              clk,
  input  logic              rst_n,
  // context bus
  input  logic [7:0]        cfg_pe,
  input  logic [1:0]        cfg_irf_we,
  input  logic [1:0]        cfg_crf_we,
  input  logic [4:0]        cfg_idx,
  input  logic [63:0]       cfg_data,
  input  logic [NPE-1:0]    used,
  input  logic              start,
  output logic              done,
  // status
  output logic              global_stall,
  output logic [NPE-1:0]    clockgate_en,
  output logic [NPE-1:0]    nop_busy,
  output logic [NPE-1:0]    halted,
  output logic [DATA_W-1:0] opr [NPE],
  // TCDM interconnect ports, one per LSU
  output logic              lsu_req   [N_LSU],
  output logic              lsu_we    [N_LSU],
  output logic [31:0]       lsu_addr  [N_LSU],
  output logic [31:0]       lsu_wdata [N_LSU],
  input  logic              lsu_gnt   [N_LSU],
  input  logic [31:0]       lsu_rdata [N_LSU]
);
  // LSU placement: PEs are ranked checkerboard first ((row + col) even, in
  // index order), then the rest; the first N_LSU of that order get an LSU.
  function automatic bit on_board(input int unsigned p);
    return ((p / COLS) + (p % COLS)) % 2 == 0;
  endfunction
  function automatic bit has_lsu(input int unsigned p);
    int unsigned rank = 0;
    for (int unsigned q = 0; q < NPE; q++)
      if (on_board(q) && q < p) rank++;
    if (!on_board(p)) begin
      rank = 0;
      for (int unsigned q = 0; q < NPE; q++) if (on_board(q)) rank++;
      for (int unsigned q = 0; q < p; q++) if (!on_board(q)) rank++;
    end
    return rank < N_LSU;
  endfunction
  function automatic int unsigned lsu_of(input int unsigned p);
    int unsigned n = 0;
    for (int unsigned q = 0; q < p; q++) if (has_lsu(q)) n++;
    return n;
  endfunction
  function automatic int unsigned count_lsu();
    return lsu_of(NPE);
  endfunction

  initial begin
    if (count_lsu() != N_LSU)
      $error("N_LSU = %0d must lie between 1 and %0d", N_LSU, NPE);
  end

  logic [NPE-1:0] cr, pending;
  logic           cond_any;

  assign cond_any     = |cr;
  assign global_stall = |pending;
  assign done         = &(halted | ~used);

  for (genvar p = 0; p < int'(NPE); p++) begin : g_pe
    localparam int unsigned R = p / COLS;
    localparam int unsigned C = p % COLS;
    localparam int unsigned PN = ((R + ROWS - 1) % ROWS) * COLS + C;
    localparam int unsigned PS = ((R + 1) % ROWS) * COLS + C;
    localparam int unsigned PE_ = R * COLS + (C + 1) % COLS;
    localparam int unsigned PW = R * COLS + (C + COLS - 1) % COLS;
    localparam bit HL = has_lsu(p);

    logic [DATA_W-1:0] nbr [4];
    logic              sel;
    logic              m_req, m_we, m_gnt;
    logic [31:0]       m_addr, m_wdata, m_rdata;

    assign nbr[DIR_N] = opr[PN];
    assign nbr[DIR_E] = opr[PE_];
    assign nbr[DIR_S] = opr[PS];
    assign nbr[DIR_W] = opr[PW];
    assign sel = int'(cfg_pe) == p;

    ipa_pe #(.HAS_LSU(HL)) u_pe (
      .clk, .rst_n,
      .cfg_irf_we(sel ? cfg_irf_we : 2'b00), .cfg_crf_we(sel ? cfg_crf_we : 2'b00),
      .cfg_idx, .cfg_data,
      .used(used[p]), .start, .cond_any, .global_stall,
      .cr(cr[p]), .halted(halted[p]), .clockgate_en(clockgate_en[p]), .nop_busy(nop_busy[p]),
      .nbr_opr(nbr), .opr(opr[p]),
      .mem_req(m_req), .mem_we(m_we), .mem_addr(m_addr), .mem_wdata(m_wdata),
      .mem_gnt(m_gnt), .mem_rdata(m_rdata), .mem_pending(pending[p]));

    if (HL) begin : g_port
      localparam int unsigned L = lsu_of(p);
      assign lsu_req[L]   = m_req;
      assign lsu_we[L]    = m_we;
      assign lsu_addr[L]  = m_addr;
      assign lsu_wdata[L] = m_wdata;
      assign m_gnt        = lsu_gnt[L];
      assign m_rdata      = lsu_rdata[L];
    end else begin : g_noport
      assign m_gnt   = 1'b0;
      assign m_rdata = '0;
    end
  end
endmodule
