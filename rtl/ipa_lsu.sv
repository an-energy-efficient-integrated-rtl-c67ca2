// ipa_lsu: load/store unit of an IPA processing element.
//
// The unit lives in the ungated clock domain. When its PE issues LD or ST it
// raises `req` towards the logarithmic interconnect with the word address and,
// for a store, the data. A request that is not granted in the cycle shows up
// on `pending`; the array ORs all pending bits into the global stall, which
// freezes every PE so the same instruction is issued again next cycle. An LSU
// that was granted while the stall is high remembers that it is done (and the
// load data) so it does not access memory twice; it is released when the
// stall drops and the PE retires the instruction.
//
// Handshake: req/we/addr/wdata are valid together; gnt and rdata answer in the
// same cycle (single-cycle TCDM access). `ld_data` is the value the PE writes
// back: the memory data when granted in the retiring cycle, otherwise the
// stored copy. The stall protocol follows the architecture; the same-cycle
// handshake is this implementation's choice.
// mem_addr and mem_wdata are the PE's address and data passed through
// unchanged; the unit's logic is the request, done and hold-data control.
module ipa_lsu
  import ipa_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              issue,       // PE issues this instruction
  input  logic              is_ld,
  input  logic              is_st,
  input  logic [DATA_W-1:0] addr,
  input  logic [DATA_W-1:0] wdata,
  input  logic              global_stall,
  output logic              req,
  output logic              we,
  output logic [DATA_W-1:0] mem_addr,
  output logic [DATA_W-1:0] mem_wdata,
  input  logic              gnt,
  input  logic [DATA_W-1:0] rdata,
  output logic              pending,
  output logic [DATA_W-1:0] ld_data
);
  logic              done;
  logic [DATA_W-1:0] held;

  assign req       = issue && (is_ld || is_st) && !done;
  assign we        = is_st;
  assign mem_addr  = addr;
  assign mem_wdata = wdata;
  assign pending   = req && !gnt;
  assign ld_data   = done ? held : rdata;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      done <= 1'b0;
      held <= '0;
    end else if (!global_stall) begin
      done <= 1'b0;
    end else if (req && gnt) begin
      done <= 1'b1;
      held <= rdata;
    end
  end

  // A request must stay stable until it is granted.
  property p_req_hold;
    @(posedge clk) disable iff (!rst_n) (req && !gnt) |=> (req && mem_addr == $past(mem_addr));
  endproperty
  a_req_hold: assert property (p_req_hold);
endmodule
