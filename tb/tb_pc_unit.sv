// tb_pc_unit: self-checking test of the program counter loop.
//
// Checks the reset value, that the PC advances by 4 on every clock edge
// when no branch is taken, and that a taken branch loads
// PC + 4 + 4 * offset for positive, zero and negative offsets, all in the
// cycle after the request (one PC update per clock).
module tb_pc_unit;
  logic        clk = 0, rst_n = 0, take_branch = 0;
  logic [31:0] imm_sext = 0, pc, pc_plus4, branch_target;
  logic [31:0] exp_pc;
  int          checks = 0, failures = 0;

  pc_unit dut (
    .clk(clk), .rst_n(rst_n), .take_branch(take_branch), .imm_sext(imm_sext),
    .pc(pc), .pc_plus4(pc_plus4), .branch_target(branch_target));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_pc(string what);
    checks++;
    if (pc !== exp_pc) begin
      failures++;
      $display("FAIL %s: pc=%h expected %h", what, pc, exp_pc);
    end
  endtask

  initial begin
    @(posedge clk); #1;
    exp_pc = 0;
    check_pc("reset");
    rst_n = 1;
    for (int i = 0; i < 1000; i++) begin
      logic [15:0] off;
      take_branch = ($urandom % 3) == 0;
      off = (i % 5 == 0) ? 16'h0000 : (i % 5 == 1) ? 16'hFFFF : 16'($urandom);
      imm_sext = {{16{off[15]}}, off};
      #1;
      checks++;
      if (pc_plus4 !== exp_pc + 4 ||
          branch_target !== exp_pc + 4 + (imm_sext << 2)) begin
        failures++;
        $display("FAIL adders: pc=%h pc+4=%h target=%h", pc, pc_plus4, branch_target);
      end
      @(posedge clk); #1;
      exp_pc = take_branch ? exp_pc + 4 + (imm_sext << 2) : exp_pc + 4;
      check_pc(take_branch ? "branch" : "increment");
    end
    // reset again from a non-zero PC
    rst_n = 0; @(posedge clk); #1;
    exp_pc = 0;
    check_pc("second reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
