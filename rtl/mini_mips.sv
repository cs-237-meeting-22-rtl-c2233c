// mini_mips: single-cycle processor for a subset of MIPS.
//
// Executes lw, sw, beq, add, sub, and, or and slt, one instruction per
// clock. Each cycle the PC addresses the instruction memory; the
// instruction is split into fields; rs and rt select two registers in the
// register bank; the ALU combines the rs value with either the rt value
// (R-type, beq) or the sign-extended offset (lw, sw); the data memory is
// read or written at the ALU result; and on the rising edge the result (or
// the loaded word) is written to rd (R-type) or rt (lw) while the PC moves
// to PC + 4, or to the beq target when the ALU's zero flag shows the two
// registers equal. Four multiplexers merge the per-instruction data paths:
// write address (rt/rd), write data (ALU/memory), ALU operand B
// (register/immediate) and next PC (PC+4/branch target).
//
// Interface: clk; rst_n is an active-low synchronous reset (PC to 0, all
// registers to 0). Hold the processor in reset while the program is loaded
// through imem_we/imem_waddr/imem_wdata. pc, instr and the dmem_* outputs
// show the instruction executing in the current cycle and the data memory
// write it makes at the next edge. dbg_raddr/dbg_rdata read any register
// combinationally for observation.
//
// The components and their connections follow the processor description;
// memory sizes, the load and debug ports, reset and encodings are this
// design's choices.
module mini_mips
  import mips_pkg::*;
#(
  parameter int unsigned IMEM_WORDS = 256,
  parameter int unsigned DMEM_WORDS = 256
) (
  input  logic        clk,
  input  logic        rst_n,
  // program load port
  input  logic        imem_we,
  input  logic [31:0] imem_waddr,
  input  logic [31:0] imem_wdata,
  // observation
  output logic [31:0] pc,
  output logic [31:0] instr,
  output logic        dmem_we,
  output logic [31:0] dmem_addr,
  output logic [31:0] dmem_wdata,
  input  logic [4:0]  dbg_raddr,
  output logic [31:0] dbg_rdata
);

  instr_fields_t f;
  ctrl_t         ctrl;
  logic [31:0]   pc_plus4, branch_target;
  logic [31:0]   rs_val, rt_val, alu_b, alu_y, mem_rdata, wb_data;
  logic [4:0]    wr_addr;
  logic          alu_zero, take_branch;

  // PC loop: register, +4, branch target, next-PC mux
  pc_unit u_pc (
    .clk          (clk),
    .rst_n        (rst_n),
    .take_branch  (take_branch),
    .imm_sext     (f.imm_sext),
    .pc           (pc),
    .pc_plus4     (pc_plus4),
    .branch_target(branch_target)
  );

  assign take_branch = ctrl.branch & alu_zero;

  instr_mem #(.WORDS(IMEM_WORDS)) u_imem (
    .clk  (clk),
    .raddr(pc),
    .rdata(instr),
    .we   (imem_we),
    .waddr(imem_waddr),
    .wdata(imem_wdata)
  );

  instr_decode u_dec (
    .instr(instr),
    .f    (f)
  );

  control_unit u_ctrl (
    .opcode(f.opcode),
    .funct (f.funct),
    .ctrl  (ctrl)
  );

  // write address: rt for lw, rd for R-type
  mux2 #(.WIDTH(5)) u_regdst_mux (
    .d0 (f.rt),
    .d1 (f.rd),
    .sel(ctrl.reg_dst),
    .y  (wr_addr)
  );

  reg_file #(.WIDTH(XLEN), .NREGS(NREGS)) u_rf (
    .clk  (clk),
    .rst_n(rst_n),
    .ra1  (f.rs),
    .rd1  (rs_val),
    .ra2  (f.rt),
    .rd2  (rt_val),
    .ra3  (dbg_raddr),
    .rd3  (dbg_rdata),
    .we   (ctrl.reg_write & rst_n),
    .wa   (wr_addr),
    .wd   (wb_data)
  );

  // ALU operand B: register rt, or the sign-extended offset for lw/sw
  mux2 #(.WIDTH(32)) u_alusrc_mux (
    .d0 (rt_val),
    .d1 (f.imm_sext),
    .sel(ctrl.alu_src),
    .y  (alu_b)
  );

  alu #(.WIDTH(XLEN)) u_alu (
    .a     (rs_val),
    .b     (alu_b),
    .op    (ctrl.alu_op),
    .result(alu_y),
    .zero  (alu_zero)
  );

  assign dmem_we    = ctrl.mem_write & rst_n;
  assign dmem_addr  = alu_y;
  assign dmem_wdata = rt_val;

  data_mem #(.WORDS(DMEM_WORDS)) u_dmem (
    .clk  (clk),
    .we   (dmem_we),
    .addr (dmem_addr),
    .wdata(dmem_wdata),
    .rdata(mem_rdata)
  );

  // write-back data: ALU result, or the loaded word for lw
  mux2 #(.WIDTH(32)) u_memtoreg_mux (
    .d0 (alu_y),
    .d1 (mem_rdata),
    .sel(ctrl.mem_to_reg),
    .y  (wb_data)
  );

endmodule
