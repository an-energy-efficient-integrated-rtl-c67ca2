// ipa_regfile: register array with two synchronous write ports and two
// combinational read ports.
//
// One module serves the three register files of a processing element: the
// instruction register file (IRF, 32 x 20 bits), the regular register file
// (RRF, 8 x 32 bits) and the constant register file (CRF, 16 x 32 bits). A
// write with `we` high lands at the rising clock edge; the second write port
// (`we1`) lets the context loader fill two entries per cycle and wins if
// both ports address the same entry; reads see the stored
// value in the same cycle (no write-to-read bypass). Reset clears the array.
// The sizes follow the architecture; the port counts and reset-to-zero are
// choices of this implementation.
module ipa_regfile #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 8,
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic             we1,
  input  logic [AW-1:0]    waddr1,
  input  logic [WIDTH-1:0] wdata1,
  input  logic [AW-1:0]    raddr0,
  output logic [WIDTH-1:0] rdata0,
  input  logic [AW-1:0]    raddr1,
  output logic [WIDTH-1:0] rdata1
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(DEPTH); i++) mem[i] <= '0;
    end else begin
      if (we && (int'(waddr) < int'(DEPTH)))    mem[waddr]  <= wdata;
      if (we1 && (int'(waddr1) < int'(DEPTH)))  mem[waddr1] <= wdata1;
    end
  end

  assign rdata0 = (int'(raddr0) < int'(DEPTH)) ? mem[raddr0] : '0;
  assign rdata1 = (int'(raddr1) < int'(DEPTH)) ? mem[raddr1] : '0;
endmodule
