// alu: the processor's arithmetic and logical unit.
//
// Combinational. Takes two WIDTH-bit operands and, depending on the 3-bit
// operation select, produces a + b, a - b, a & b, a | b or the set-less-than
// result (1 when a < b as signed two's-complement numbers, else 0). The
// zero output is 1 whenever the result is 0; beq uses it after a subtract to
// decide whether its two registers are equal.
//
// The operation list and the zero flag follow the processor description;
// the operation encoding (from mips_pkg) and the signed comparison for slt
// (the MIPS meaning of slt) are this design's choices. An unused select
// value yields 0.
module alu
  import mips_pkg::*;
#(
  parameter int unsigned WIDTH = 32
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  alu_op_e          op,
  output logic [WIDTH-1:0] result,
  output logic             zero
);

  always_comb begin
    unique case (op)
      ALU_AND: result = a & b;
      ALU_OR:  result = a | b;
      ALU_ADD: result = a + b;
      ALU_SUB: result = a - b;
      ALU_SLT: result = {{(WIDTH-1){1'b0}}, ($signed(a) < $signed(b))};
      default: result = '0;
    endcase
  end

  assign zero = (result == '0);

endmodule
