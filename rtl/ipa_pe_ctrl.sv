// ipa_pe_ctrl: the instruction sequencer of an IPA processing element.
//
// It holds the fetch address (program counter) into the PE's instruction
// register file and the halted flag. `start` begins a kernel at address 0.
// In a cycle where the PE's clock is enabled (`en`), the address advances by
// one, or takes the jmp target, or, for a cjmp, the true target when
// `cond_any` is high and the false target otherwise. `cond_any` is the OR of
// the condition registers of all PEs, so the single PE that evaluated the
// branch condition steers every PE; the PEs hold jumps at the same cycle in
// their own programs and stay in lock-step. EXIT sets `halted`; a halted PE
// keeps its address. Outside enabled cycles nothing changes.
//
// The jump behaviour and the OR of the condition bits follow the
// architecture; loading the target straight into the program counter (the
// architecture's jump register) is this implementation's simplification.
module ipa_pe_ctrl
  import ipa_pkg::*;
#(
  parameter int unsigned AW = 5
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic          en,
  input  logic          is_jmp,
  input  logic          is_cjmp,
  input  logic          is_exit,
  input  logic [AW-1:0] tgt_true,
  input  logic [AW-1:0] tgt_false,
  input  logic          cond_any,
  output logic [AW-1:0] pc,
  output logic          halted
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc     <= '0;
      halted <= 1'b1;
    end else if (start) begin
      pc     <= '0;
      halted <= 1'b0;
    end else if (en && !halted) begin
      if (is_exit)      halted <= 1'b1;
      else if (is_jmp)  pc <= tgt_true;
      else if (is_cjmp) pc <= cond_any ? tgt_true : tgt_false;
      else              pc <= pc + 1'b1;
    end
  end
endmodule
