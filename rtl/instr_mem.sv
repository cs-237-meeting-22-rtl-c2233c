// instr_mem: the instruction memory, WORDS words of 32 bits.
//
// Separate from the data memory. The read port is combinational: the
// instruction at byte address raddr (word raddr[.. :2]) appears in the same
// cycle, so a whole instruction executes in one clock. A synchronous write
// port (we, waddr, wdata) loads the program, normally while the processor
// is held in reset. Addresses beyond the memory wrap around; the low two
// address bits are ignored. Contents start undefined; load every word that
// is fetched.
//
// A separate 32-bit instruction memory read at the PC follows the processor
// description; its size, the load port and the wrap-around are this
// design's choices.
module instr_mem #(
  parameter int unsigned WORDS = 256,
  localparam int unsigned AW = $clog2(WORDS)
) (
  input  logic        clk,
  input  logic [31:0] raddr,
  output logic [31:0] rdata,
  input  logic        we,
  input  logic [31:0] waddr,
  input  logic [31:0] wdata
);

  logic [31:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (we) mem[waddr[AW+1:2]] <= wdata;
  end

  assign rdata = mem[raddr[AW+1:2]];

endmodule
