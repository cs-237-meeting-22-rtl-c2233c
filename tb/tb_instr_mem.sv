// tb_instr_mem: self-checking test of the instruction memory.
//
// Loads every word through the write port, then reads them all back at
// their byte addresses, also with the low two address bits set and with an
// address one memory size higher (which wraps to the same word).
module tb_instr_mem;
  localparam int unsigned WORDS = 64;
  logic        clk = 0, we = 0;
  logic [31:0] raddr = 0, rdata, waddr = 0, wdata = 0;
  logic [31:0] ref_mem [WORDS];
  int          checks = 0, failures = 0;

  instr_mem #(.WORDS(WORDS)) dut (
    .clk(clk), .raddr(raddr), .rdata(rdata), .we(we), .waddr(waddr), .wdata(wdata));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < WORDS; i++) begin
      ref_mem[i] = $urandom;
      we = 1; waddr = 32'(4 * i); wdata = ref_mem[i];
      @(posedge clk); #1;
    end
    we = 0;
    for (int pass = 0; pass < 3; pass++) begin
      for (int i = 0; i < WORDS; i++) begin
        raddr = 32'(4 * i) + (pass == 1 ? 32'(i % 4) : 0) + (pass == 2 ? 32'(4 * WORDS) : 0);
        #1;
        checks++;
        if (rdata !== ref_mem[i]) begin
          failures++;
          $display("FAIL addr=%h rdata=%h expected %h", raddr, rdata, ref_mem[i]);
        end
      end
    end
    // overwrite one word and check that only it changed
    we = 1; waddr = 32'd20; wdata = 32'hDEAD_BEEF; ref_mem[5] = wdata;
    @(posedge clk); #1; we = 0;
    for (int i = 0; i < WORDS; i++) begin
      raddr = 32'(4 * i); #1;
      checks++;
      if (rdata !== ref_mem[i]) begin
        failures++;
        $display("FAIL after overwrite addr=%h rdata=%h expected %h", raddr, rdata, ref_mem[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
