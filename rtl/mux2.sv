// mux2: two-input multiplexer.
//
// Combinational: y = sel ? d1 : d0. The processor uses one wherever two
// merged per-instruction data paths would drive the same input: the
// register write address (rt or rd), the register write data (ALU or
// memory), the ALU's second operand (register or immediate) and the next
// PC (PC+4 or branch target). WIDTH sets the data width.
module mux2 #(
  parameter int unsigned WIDTH = 32
) (
  input  logic [WIDTH-1:0] d0,
  input  logic [WIDTH-1:0] d1,
  input  logic             sel,
  output logic [WIDTH-1:0] y
);

  always_comb y = sel ? d1 : d0;

endmodule
