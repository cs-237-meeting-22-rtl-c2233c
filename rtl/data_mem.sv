// data_mem: the data memory, WORDS words of 32 bits.
//
// One address port used by both lw and sw. Reads are combinational (the
// word at byte address addr is on rdata in the same cycle); writes of wdata
// happen on the rising clock edge when we is 1. Only whole, word-aligned
// words are accessed: the low two address bits are ignored and addresses
// beyond the memory wrap around. Contents start undefined.
//
// A 32-bit data memory addressed by the ALU result, written with a
// register value by sw and read into a register by lw, follows the
// processor description; its size and the read/write timing are this
// design's choices.
module data_mem #(
  parameter int unsigned WORDS = 256,
  localparam int unsigned AW = $clog2(WORDS)
) (
  input  logic        clk,
  input  logic        we,
  input  logic [31:0] addr,
  input  logic [31:0] wdata,
  output logic [31:0] rdata
);

  logic [31:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (we) mem[addr[AW+1:2]] <= wdata;
  end

  assign rdata = mem[addr[AW+1:2]];

endmodule
