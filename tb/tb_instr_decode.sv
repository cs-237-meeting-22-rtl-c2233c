// tb_instr_decode: self-checking test of the instruction field splitter.
//
// Builds instruction words from random field values (opcode, rs, rt, rd,
// shift amount, function; or a 16-bit immediate) and checks that each field
// comes back out, with the immediate sign-extended to 32 bits.
module tb_instr_decode;
  import mips_pkg::*;

  logic [31:0]   instr;
  instr_fields_t f;
  int            checks = 0, failures = 0;

  instr_decode dut (.instr(instr), .f(f));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 1000; i++) begin
      logic [5:0]  op, fn;
      logic [4:0]  rs, rt, rd, sh;
      logic [15:0] imm;
      logic [31:0] imm_exp;
      op = 6'($urandom); rs = 5'($urandom); rt = 5'($urandom);
      rd = 5'($urandom); sh = 5'($urandom); fn = 6'($urandom);
      imm = {rd, sh, fn};
      instr = {op, rs, rt, rd, sh, fn};
      imm_exp = imm[15] ? (32'hFFFF0000 | 32'(imm)) : 32'(imm);
      #1;
      checks++;
      if (f.opcode !== op || f.rs !== rs || f.rt !== rt || f.rd !== rd ||
          f.shamt !== sh || f.funct !== fn || f.imm_sext !== imm_exp) begin
        failures++;
        $display("FAIL instr=%h fields=%p", instr, f);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
