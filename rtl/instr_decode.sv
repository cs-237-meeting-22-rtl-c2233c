// instr_decode: splits a 32-bit instruction word into its fields.
//
// Pure wiring plus sign extension, no state. Both formats the processor
// uses share the opcode (31:26), rs (25:21) and rt (20:16) positions. The
// R-type format adds rd (15:11), the shift amount (10:6) and the function
// code (5:0); the I-type format holds a 16-bit address/offset (15:0), which
// is sign-extended to 32 bits. Every field is produced for every
// instruction; the control unit decides which are used.
//
// The field layout and the sign extension follow the MIPS formats given in
// the processor description.
module instr_decode
  import mips_pkg::*;
(
  input  logic [31:0]   instr,
  output instr_fields_t f
);

  always_comb begin
    f.opcode   = instr[31:26];
    f.rs       = instr[25:21];
    f.rt       = instr[20:16];
    f.rd       = instr[15:11];
    f.shamt    = instr[10:6];
    f.funct    = instr[5:0];
    f.imm_sext = {{16{instr[15]}}, instr[15:0]};
  end

endmodule
