// ipa_pmu: the power management unit of one IPA processing element.
//
// It decides, every cycle, whether the PE's clock runs. clockgate_en is low
//   * for a PE that the current kernel does not use, and for a PE that has
//     executed EXIT,
//   * during a global stall (a TCDM bank conflict anywhere in the array), and
//   * while a multi-cycle NOP is being counted down.
// When the PE issues "NOP n" (nop_load with clockgate_en high) the counter
// is loaded with n-1, so the NOP occupies n cycles: the issue cycle plus n-1
// gated cycles. The counter does not move while the global stall is high,
// which keeps all PEs in step. The unit itself sits in the ungated clock
// domain. `clear` (kernel start) empties the counter.
//
// The three idle causes and the counter that halts during a stall follow the
// architecture. Expressing the gate as an enable (the PE's registers only load
// when clockgate_en is high) instead of a gated clock net is this
// implementation's choice; a clock-gating cell would be driven by the same
// signal.
module ipa_pmu #(
  parameter int unsigned CNT_W = 15
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             used,
  input  logic             halted,
  input  logic             global_stall,
  input  logic             nop_load,
  input  logic [CNT_W-1:0] nop_count,
  output logic             issue,        // PE may issue (ignores the stall)
  output logic             clockgate_en, // PE registers may load this cycle
  output logic             nop_busy
);
  logic [CNT_W-1:0] cnt;

  assign nop_busy     = cnt != '0;
  assign issue        = used && !halted && !nop_busy;
  assign clockgate_en = issue && !global_stall;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= '0;
    end else if (clear || !used) begin
      cnt <= '0;
    end else if (nop_busy) begin
      if (!global_stall) cnt <= cnt - 1'b1;
    end else if (clockgate_en && nop_load && nop_count > 1) begin
      cnt <= nop_count - 1'b1;
    end
  end
endmodule
