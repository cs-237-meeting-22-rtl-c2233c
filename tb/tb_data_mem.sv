// tb_data_mem: self-checking test of the data memory.
//
// Runs random reads and writes (as lw and sw would issue them) against a
// reference array kept here: a read shows the current contents in the same
// cycle, a write takes effect at the clock edge, and a cycle with the
// write enable low changes nothing.
module tb_data_mem;
  localparam int unsigned WORDS = 64;
  logic        clk = 0, we = 0;
  logic [31:0] addr = 0, wdata = 0, rdata;
  logic [31:0] ref_mem [WORDS];
  int          checks = 0, failures = 0;

  data_mem #(.WORDS(WORDS)) dut (
    .clk(clk), .we(we), .addr(addr), .wdata(wdata), .rdata(rdata));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // initialise through the write port
    for (int i = 0; i < WORDS; i++) begin
      ref_mem[i] = $urandom;
      we = 1; addr = 32'(4 * i); wdata = ref_mem[i];
      @(posedge clk); #1;
    end
    for (int n = 0; n < 3000; n++) begin
      int w;
      w = $urandom % WORDS;
      we = ($urandom % 2) == 1;
      addr = 32'(4 * w) + ((n % 5 == 0) ? 32'(4 * WORDS) : 0);
      wdata = $urandom;
      #1;
      checks++;
      if (rdata !== ref_mem[w]) begin
        failures++;
        $display("FAIL read addr=%h rdata=%h expected %h", addr, rdata, ref_mem[w]);
      end
      @(posedge clk);
      if (we) ref_mem[w] = wdata;
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
