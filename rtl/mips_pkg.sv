// mips_pkg: encodings and types shared by the mini-MIPS blocks.
//
// The processor executes a subset of MIPS: lw, sw, beq and the R-type
// instructions add, sub, and, or and slt. Only two instruction formats are
// needed (I-type and R-type). The opcode and function-field values are the
// standard MIPS32 encodings; the ALU operation code and the control-signal
// bundle are this design's own choices.
package mips_pkg;

  localparam int unsigned XLEN = 32;  // data path width
  localparam int unsigned NREGS = 32;  // register bank size

  // Primary opcodes (instruction bits 31:26)
  typedef enum logic [5:0] {
    OP_RTYPE = 6'h00,
    OP_BEQ   = 6'h04,
    OP_LW    = 6'h23,
    OP_SW    = 6'h2B
  } opcode_e;

  // R-type function field values (instruction bits 5:0)
  localparam logic [5:0] FN_ADD = 6'h20;
  localparam logic [5:0] FN_SUB = 6'h22;
  localparam logic [5:0] FN_AND = 6'h24;
  localparam logic [5:0] FN_OR  = 6'h25;
  localparam logic [5:0] FN_SLT = 6'h2A;

  // ALU operation select
  typedef enum logic [2:0] {
    ALU_AND = 3'd0,
    ALU_OR  = 3'd1,
    ALU_ADD = 3'd2,
    ALU_SUB = 3'd6,
    ALU_SLT = 3'd7
  } alu_op_e;

  // Decoded instruction fields
  typedef struct packed {
    logic [5:0]      opcode;
    logic [4:0]      rs;
    logic [4:0]      rt;
    logic [4:0]      rd;
    logic [4:0]      shamt;
    logic [5:0]      funct;
    logic [XLEN-1:0] imm_sext;  // 16-bit immediate, sign-extended
  } instr_fields_t;

  // Control signals driven by the control unit
  typedef struct packed {
    logic    reg_dst;     // 1: write register is rd (R-type), 0: rt (lw)
    logic    alu_src;     // 1: ALU operand B is the immediate, 0: register rt
    logic    mem_to_reg;  // 1: write-back data from data memory, 0: from ALU
    logic    reg_write;   // register bank write enable
    logic    mem_write;   // data memory write enable
    logic    branch;      // beq: take branch when ALU zero flag is set
    alu_op_e alu_op;      // ALU operation
  } ctrl_t;

endpackage
