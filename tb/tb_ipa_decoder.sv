// tb_ipa_decoder: self-checking test of the instruction decoder. Random
// field values are packed by hand (independently of the package's struct)
// and every decoded field and class flag is compared.
`timescale 1ns/1ps
module tb_ipa_decoder;
  import ipa_pkg::*;
  logic [19:0] instr;
  opcode_e op;
  out_type_e out_type;
  logic [2:0] dest;
  src_t in0, in1;
  logic [4:0] tgt_true, tgt_false;
  logic [14:0] nop_cnt;
  logic is_nop, is_jmp, is_cjmp, is_exit, is_ld, is_st, writes_opr, writes_rrf;
  int checks = 0, failures = 0;

  ipa_decoder dut (.*);

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (instr %h)", s, instr); end
  endtask

  initial begin
    for (int n = 0; n < 2000; n++) begin
      int unsigned o, ot, d, t0, a0, t1, a1;
      bit res;
      o = n % 21; ot = $urandom % 4; d = $urandom % 8;
      t0 = $urandom % 2; a0 = $urandom % 16; t1 = $urandom % 2; a1 = $urandom % 16;
      instr = 20'((o << 15) | (ot << 13) | (d << 10) | (t0 << 9) | (a0 << 5) | (t1 << 4) | a1);
      #1;
      chk(int'(op) == o, "opcode");
      chk(int'(out_type) == ot, "output type");
      chk(int'(dest) == d, "dest");
      chk(in0.is_crf == t0 && int'(in0.addr) == a0, "in0");
      chk(in1.is_crf == t1 && int'(in1.addr) == a1, "in1");
      chk(int'(tgt_true) == ((ot << 3) | d), "jump target");
      chk(int'(tgt_false) == ((t0 << 4) | a0), "false target");
      chk(int'(nop_cnt) == (int'(instr) & 32'h7fff), "nop count");
      chk(is_nop == (o == 0) && is_ld == (o == 16) && is_st == (o == 17) &&
          is_jmp == (o == 18) && is_cjmp == (o == 19) && is_exit == (o == 20), "class");
      res = !(o == 0 || o == 17 || o == 18 || o == 19 || o == 20);
      chk(writes_opr == (res && (ot == 1 || ot == 3)), "writes_opr");
      chk(writes_rrf == (res && (ot == 2 || ot == 3)), "writes_rrf");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
