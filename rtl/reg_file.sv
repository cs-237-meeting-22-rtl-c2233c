// reg_file: the register bank, NREGS registers of WIDTH bits.
//
// Two asynchronous (combinational) read ports, ra1/rd1 and ra2/rd2, and one
// synchronous write port written on the rising clock edge when we is 1.
// Register 0 always reads as zero and ignores writes, as in the MIPS
// architecture. A read of the register being written in the same cycle
// returns the old value; the new value appears after the edge, which is
// what a single-cycle processor needs. A third read port, ra3/rd3, lets the
// surroundings observe any register; the processor itself does not use it. Synchronous active-low reset clears
// every register.
//
// The size (32 registers of 32 bits) and the port set (two read addresses,
// one write address, write data) follow the processor description; the
// hard-wired zero register, reset and write timing are this design's
// choices.
module reg_file #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned NREGS = 32,
  localparam int unsigned AW = $clog2(NREGS)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [AW-1:0]    ra1,
  output logic [WIDTH-1:0] rd1,
  input  logic [AW-1:0]    ra2,
  output logic [WIDTH-1:0] rd2,
  input  logic [AW-1:0]    ra3,
  output logic [WIDTH-1:0] rd3,
  input  logic             we,
  input  logic [AW-1:0]    wa,
  input  logic [WIDTH-1:0] wd
);

  logic [WIDTH-1:0] regs [NREGS];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < NREGS; i++) regs[i] <= '0;
    end else if (we && wa != '0) begin
      regs[wa] <= wd;
    end
  end

  assign rd1 = (ra1 == '0) ? '0 : regs[ra1];
  assign rd2 = (ra2 == '0) ? '0 : regs[ra2];
  assign rd3 = (ra3 == '0) ? '0 : regs[ra3];

endmodule
