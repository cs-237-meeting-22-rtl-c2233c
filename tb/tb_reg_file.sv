// tb_reg_file: self-checking test of the register bank.
//
// Resets the bank, then for many cycles writes random data to random
// registers (sometimes with the enable low, sometimes to register 0) and
// reads three random registers, comparing with a shadow array kept here.
// Also checks that a read in the cycle of a write still sees the old value
// and that the new value is visible right after the clock edge.
module tb_reg_file;
  logic        clk = 0, rst_n = 0;
  logic [4:0]  ra1, ra2, ra3, wa;
  logic [31:0] rd1, rd2, rd3, wd;
  logic        we;
  logic [31:0] shadow [32];
  int          checks = 0, failures = 0;

  reg_file #(.WIDTH(32), .NREGS(32)) dut (
    .clk(clk), .rst_n(rst_n), .ra1(ra1), .rd1(rd1), .ra2(ra2), .rd2(rd2),
    .ra3(ra3), .rd3(rd3), .we(we), .wa(wa), .wd(wd));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_read(logic [4:0] a, logic [31:0] got, string port);
    checks++;
    if (got !== shadow[a]) begin
      failures++;
      $display("FAIL %s reg %0d = %h expected %h", port, a, got, shadow[a]);
    end
  endtask

  initial begin
    we = 0; wa = 0; wd = 0; ra1 = 0; ra2 = 0; ra3 = 0;
    foreach (shadow[i]) shadow[i] = '0;
    @(posedge clk); @(posedge clk);
    #1 rst_n = 1;
    // after reset every register reads zero
    for (int r = 0; r < 32; r++) begin
      ra1 = 5'(r); #1; check_read(5'(r), rd1, "rd1");
    end
    for (int i = 0; i < 2000; i++) begin
      we = ($urandom % 4) != 0;
      wa = (i % 13 == 0) ? 5'd0 : 5'($urandom);
      wd = $urandom;
      ra1 = 5'($urandom); ra2 = 5'($urandom); ra3 = (i % 3 == 0) ? wa : 5'($urandom);
      #1;
      // reads during the write cycle return the old contents
      check_read(ra1, rd1, "rd1");
      check_read(ra2, rd2, "rd2");
      check_read(ra3, rd3, "rd3");
      @(posedge clk);
      if (we && wa != 0) shadow[wa] = wd;
      #1;
      ra1 = wa; #1;
      check_read(wa, rd1, "rd1 after write");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
