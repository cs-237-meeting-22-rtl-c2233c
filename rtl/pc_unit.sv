// pc_unit: the program counter loop.
//
// Holds the 32-bit PC, which addresses the instruction memory. Every rising
// clock edge the PC takes its next value from a two-input multiplexer:
// PC + 4 normally, or the branch target when take_branch is 1. The branch
// target is PC + 4 + (sign-extended offset << 2), the MIPS beq rule, so the
// offset counts instructions from the one after the branch. Synchronous
// active-low reset sets the PC to RESET_PC.
//
// Interface: pc and pc_plus4 are valid throughout the cycle; take_branch
// and imm_sext are sampled at the rising edge.
//
// The register, the +4 incrementer and the multiplexer in front of the PC
// follow the processor description; the exact target arithmetic and the
// reset value are this design's choices.
module pc_unit #(
  parameter logic [31:0] RESET_PC = 32'h0000_0000
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        take_branch,
  input  logic [31:0] imm_sext,
  output logic [31:0] pc,
  output logic [31:0] pc_plus4,
  output logic [31:0] branch_target
);

  logic [31:0] pc_next;

  assign pc_plus4      = pc + 32'd4;
  assign branch_target = pc_plus4 + {imm_sext[29:0], 2'b00};

  mux2 #(.WIDTH(32)) u_pc_mux (
    .d0 (pc_plus4),
    .d1 (branch_target),
    .sel(take_branch),
    .y  (pc_next)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) pc <= RESET_PC;
    else        pc <= pc_next;
  end

endmodule
