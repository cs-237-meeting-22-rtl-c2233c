// tb_alu: self-checking test of the ALU.
//
// Drives directed corner cases and random operand pairs through every
// operation and compares result and zero flag with values computed here
// from the operation's definition (slt as a signed comparison).
module tb_alu;
  import mips_pkg::*;

  logic [31:0] a, b, result;
  alu_op_e     op;
  logic        zero;
  int          checks = 0, failures = 0;

  alu #(.WIDTH(32)) dut (.a(a), .b(b), .op(op), .result(result), .zero(zero));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] model(alu_op_e o, logic [31:0] x, logic [31:0] y);
    logic signed [32:0] d;
    case (o)
      ALU_AND: return x & y;
      ALU_OR:  return x | y;
      ALU_ADD: return x + y;
      ALU_SUB: return x - y;
      ALU_SLT: begin
        // sign-extend to 33 bits and look at the sign of the difference
        d = {x[31], x} - {y[31], y};
        return {31'd0, d[32]};
      end
      default: return '0;
    endcase
  endfunction

  task automatic check(alu_op_e o, logic [31:0] x, logic [31:0] y);
    logic [31:0] exp;
    op = o; a = x; b = y;
    #1;
    exp = model(o, x, y);
    checks++;
    if (result !== exp || zero !== (exp == 0)) begin
      failures++;
      $display("FAIL op=%s a=%h b=%h result=%h zero=%b expected %h", o.name(), x, y, result, zero, exp);
    end
  endtask

  alu_op_e ops[5] = '{ALU_AND, ALU_OR, ALU_ADD, ALU_SUB, ALU_SLT};

  initial begin
    // directed cases
    check(ALU_SUB, 32'd5, 32'd5);              // zero flag set (beq equal)
    check(ALU_SUB, 32'd5, 32'd6);
    check(ALU_SLT, 32'hFFFF_FFFF, 32'd1);      // -1 < 1
    check(ALU_SLT, 32'd1, 32'hFFFF_FFFF);      // 1 < -1 is false
    check(ALU_SLT, 32'h8000_0000, 32'h7FFF_FFFF);
    check(ALU_ADD, 32'hFFFF_FFFF, 32'd1);      // wraps to 0
    check(ALU_AND, 32'hF0F0_F0F0, 32'h0FF0_0FF0);
    check(ALU_OR,  32'hF0F0_0000, 32'h0000_0F0F);
    // random cases
    for (int i = 0; i < 2000; i++) begin
      logic [31:0] x, y;
      x = $urandom;
      y = (i % 7 == 0) ? x : $urandom;
      if (i % 11 == 0) y = {x[31:4], 4'($urandom)};
      check(ops[i % 5], x, y);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
