// tb_control_unit: self-checking test of the main decoder.
//
// Applies every opcode with several function codes and compares the whole
// control bundle with the table of the mini-MIPS instruction types: R-type
// (add, sub, and, or, slt), lw, sw, beq, and "no effect" for anything else.
module tb_control_unit;
  import mips_pkg::*;

  logic [5:0] opcode, funct;
  ctrl_t      ctrl;
  int         checks = 0, failures = 0;

  control_unit dut (.opcode(opcode), .funct(funct), .ctrl(ctrl));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected values: {reg_dst, alu_src, mem_to_reg, reg_write, mem_write, branch}
  function automatic logic [5:0] exp_bits(logic [5:0] o, logic [5:0] fn);
    if (o == 6'h00) begin
      if (fn == 6'h20 || fn == 6'h22 || fn == 6'h24 || fn == 6'h25 || fn == 6'h2A)
        return 6'b100100;
      return 6'b100000;
    end
    if (o == 6'h23) return 6'b011100;
    if (o == 6'h2B) return 6'b010010;
    if (o == 6'h04) return 6'b000001;
    return 6'b000000;
  endfunction

  function automatic alu_op_e exp_op(logic [5:0] o, logic [5:0] fn);
    if (o == 6'h04) return ALU_SUB;
    if (o == 6'h00) begin
      case (fn)
        6'h22: return ALU_SUB;
        6'h24: return ALU_AND;
        6'h25: return ALU_OR;
        6'h2A: return ALU_SLT;
        default: return ALU_ADD;
      endcase
    end
    return ALU_ADD;
  endfunction

  logic [5:0] fns[7] = '{6'h20, 6'h22, 6'h24, 6'h25, 6'h2A, 6'h00, 6'h21};

  initial begin
    for (int o = 0; o < 64; o++) begin
      for (int k = 0; k < 7; k++) begin
        logic [5:0] got;
        opcode = 6'(o); funct = fns[k];
        #1;
        got = {ctrl.reg_dst, ctrl.alu_src, ctrl.mem_to_reg, ctrl.reg_write,
               ctrl.mem_write, ctrl.branch};
        checks++;
        // selects are only checked where they matter (an enable is set)
        if (((exp_bits(opcode, funct) & 6'b000111) != (got & 6'b000111)) ||
            (ctrl.reg_write && (got[5] != exp_bits(opcode, funct)[5] ||
                                got[3] != exp_bits(opcode, funct)[3])) ||
            ((ctrl.reg_write || ctrl.mem_write) && got[4] != exp_bits(opcode, funct)[4]) ||
            ((ctrl.reg_write || ctrl.mem_write || ctrl.branch) &&
             ctrl.alu_op != exp_op(opcode, funct))) begin
          failures++;
          $display("FAIL opcode=%h funct=%h ctrl=%p", opcode, funct, ctrl);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
