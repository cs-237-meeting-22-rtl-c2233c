// control_unit: main decoder of the single-cycle mini-MIPS.
//
// Combinational. From the opcode and, for R-type instructions, the function
// field it sets the selects of the data path multiplexers, the write
// enables and the ALU operation:
//
//   instr   reg_dst alu_src mem_to_reg reg_write mem_write branch alu_op
//   R-type     1       0        0          1         0        0    by funct
//   lw         0       1        1          1         0        0    ADD
//   sw         0       1        0          0         1        0    ADD
//   beq        0       0        0          0         0        1    SUB
//
// An R-type function code outside add/sub/and/or/slt, or any other opcode,
// gives all enables 0, so the instruction does nothing but advance the PC.
// The selects follow the data path connections of each instruction type in
// the processor description; the encodings and the "unknown means no-op"
// rule are this design's choices.
module control_unit
  import mips_pkg::*;
(
  input  logic [5:0] opcode,
  input  logic [5:0] funct,
  output ctrl_t      ctrl
);

  always_comb begin
    ctrl = '{reg_dst: 1'b0, alu_src: 1'b0, mem_to_reg: 1'b0, reg_write: 1'b0,
             mem_write: 1'b0, branch: 1'b0, alu_op: ALU_ADD};
    case (opcode)
      OP_RTYPE: begin
        ctrl.reg_dst   = 1'b1;
        ctrl.reg_write = 1'b1;
        case (funct)
          FN_ADD:  ctrl.alu_op = ALU_ADD;
          FN_SUB:  ctrl.alu_op = ALU_SUB;
          FN_AND:  ctrl.alu_op = ALU_AND;
          FN_OR:   ctrl.alu_op = ALU_OR;
          FN_SLT:  ctrl.alu_op = ALU_SLT;
          default: ctrl.reg_write = 1'b0;
        endcase
      end
      OP_LW: begin
        ctrl.alu_src    = 1'b1;
        ctrl.mem_to_reg = 1'b1;
        ctrl.reg_write  = 1'b1;
      end
      OP_SW: begin
        ctrl.alu_src   = 1'b1;
        ctrl.mem_write = 1'b1;
      end
      OP_BEQ: begin
        ctrl.branch = 1'b1;
        ctrl.alu_op = ALU_SUB;
      end
      default: ;
    endcase
  end

endmodule
