// tb_mini_mips: end-to-end test of the single-cycle mini-MIPS processor.
//
// Runs at the processor's default sizes. Two phases, each starting from
// reset with a program loaded through the instruction-memory load port:
//
//  1. A hand-written program that sums a five-word array in a loop (lw,
//     add, a taken and a not-taken beq, a backward branch), stores the sum
//     with sw, exercises sub, slt, and, or and a write to register 0, and
//     ends in a branch-to-self. Final register and memory values are
//     compared with numbers worked out by hand, and the loop's cycle count
//     with the one-instruction-per-clock rate.
//  2. Random programs of every supported instruction, run in lockstep with
//     an instruction-level reference model written here: after every clock
//     edge the PC and all 32 registers are compared, and every data-memory
//     write is compared as it happens.
//
// Data memory is preloaded through a hierarchical reference (the processor
// has no data-memory load port). Each mechanism of the data path is
// counted, and one that never happens counts as a failure.
module tb_mini_mips;
  import mips_pkg::*;

  localparam int unsigned IW = 256;  // defaults of mini_mips
  localparam int unsigned DW = 256;

  logic        clk = 0, rst_n = 0;
  logic        imem_we = 0;
  logic [31:0] imem_waddr = 0, imem_wdata = 0;
  logic [31:0] pc, instr, dmem_addr, dmem_wdata, dbg_rdata;
  logic        dmem_we;
  logic [4:0]  dbg_raddr = 0;
  int          checks = 0, failures = 0;

  mini_mips dut (
    .clk(clk), .rst_n(rst_n), .imem_we(imem_we), .imem_waddr(imem_waddr),
    .imem_wdata(imem_wdata), .pc(pc), .instr(instr), .dmem_we(dmem_we),
    .dmem_addr(dmem_addr), .dmem_wdata(dmem_wdata), .dbg_raddr(dbg_raddr),
    .dbg_rdata(dbg_rdata));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- instruction encoders ----------------
  function automatic logic [31:0] r_op(logic [5:0] fn, int rd, int rs, int rt);
    return {6'h00, 5'(rs), 5'(rt), 5'(rd), 5'd0, fn};
  endfunction
  function automatic logic [31:0] i_op(logic [5:0] op, int rt, int rs, int imm);
    return {op, 5'(rs), 5'(rt), 16'(imm)};
  endfunction
  function automatic logic [31:0] lw(int rt, int off, int rs);  return i_op(6'h23, rt, rs, off); endfunction
  function automatic logic [31:0] sw(int rt, int off, int rs);  return i_op(6'h2B, rt, rs, off); endfunction
  function automatic logic [31:0] beq(int rs, int rt, int off); return i_op(6'h04, rt, rs, off); endfunction
  function automatic logic [31:0] add_(int rd, int rs, int rt); return r_op(6'h20, rd, rs, rt); endfunction
  function automatic logic [31:0] sub_(int rd, int rs, int rt); return r_op(6'h22, rd, rs, rt); endfunction
  function automatic logic [31:0] and_(int rd, int rs, int rt); return r_op(6'h24, rd, rs, rt); endfunction
  function automatic logic [31:0] or_(int rd, int rs, int rt);  return r_op(6'h25, rd, rs, rt); endfunction
  function automatic logic [31:0] slt_(int rd, int rs, int rt); return r_op(6'h2A, rd, rs, rt); endfunction

  // ---------------- reference model ----------------
  logic [31:0] m_pc;
  logic [31:0] m_reg [32];
  logic [31:0] m_imem [IW];
  logic [31:0] m_dmem [DW];

  // mechanism counters
  int n_lw = 0, n_sw = 0, n_beq_taken = 0, n_beq_not = 0, n_add = 0, n_sub = 0, n_and = 0, n_or = 0;
  int n_slt_true = 0, n_slt_false = 0, n_r0_write = 0, n_back_branch = 0, n_nop = 0;

  // Executes the instruction at m_pc; returns 1 with address/data when it stores.
  function automatic void model_step(output logic st, output logic [31:0] st_addr,
                                     output logic [31:0] st_data);
    logic [31:0] ins, a, b, imm, res, next;
    int rs, rt, rd;
    logic wr;
    int dst;
    ins  = m_imem[m_pc[$clog2(IW)+1:2]];
    rs   = int'(ins[25:21]); rt = int'(ins[20:16]); rd = int'(ins[15:11]);
    a    = m_reg[rs]; b = m_reg[rt];
    imm  = ins[15] ? {16'hFFFF, ins[15:0]} : {16'h0000, ins[15:0]};
    next = m_pc + 4;
    st = 0; st_addr = 0; st_data = 0; wr = 0; dst = 0; res = 0;
    case (ins[31:26])
      6'h00: begin
        dst = rd; wr = 1;
        case (ins[5:0])
          6'h20: begin res = a + b; n_add++; end
          6'h22: begin res = a - b; n_sub++; end
          6'h24: begin res = a & b; n_and++; end
          6'h25: begin res = a | b; n_or++; end
          6'h2A: begin
            res = (signed'(a) < signed'(b)) ? 1 : 0;
            if (res == 1) n_slt_true++; else n_slt_false++;
          end
          default: begin wr = 0; n_nop++; end
        endcase
      end
      6'h23: begin
        dst = rt; wr = 1; n_lw++;
        res = m_dmem[(a + imm) >> 2 & (DW - 1)];
      end
      6'h2B: begin
        st = 1; st_addr = a + imm; st_data = b; n_sw++;
        m_dmem[(a + imm) >> 2 & (DW - 1)] = b;
      end
      6'h04: begin
        if (a == b) begin
          next = m_pc + 4 + (imm << 2);
          n_beq_taken++;
          if (imm[31]) n_back_branch++;
        end else n_beq_not++;
      end
      default: n_nop++;
    endcase
    if (wr && dst == 0) n_r0_write++;
    if (wr && dst != 0) m_reg[dst] = res;
    m_pc = next;
  endfunction

  // ---------------- helpers ----------------
  task automatic load_program(logic [31:0] prog[$]);
    for (int i = 0; i < IW; i++) begin
      m_imem[i] = (i < prog.size()) ? prog[i] : beq(0, 0, -1);
      imem_we = 1; imem_waddr = 32'(4 * i); imem_wdata = m_imem[i];
      @(posedge clk); #1;
    end
    imem_we = 0;
  endtask

  task automatic reset_cpu();
    rst_n = 0;
    @(posedge clk); #1;
    m_pc = 0;
    foreach (m_reg[i]) m_reg[i] = 0;
  endtask

  task automatic compare_state(string where);
    checks++;
    if (pc !== m_pc) begin
      failures++;
      $display("FAIL %s: pc=%h expected %h", where, pc, m_pc);
    end
    for (int r = 0; r < 32; r++) begin
      dbg_raddr = 5'(r); #0.1;
      checks++;
      if (dbg_rdata !== m_reg[r]) begin
        failures++;
        $display("FAIL %s: r%0d=%h expected %h", where, r, dbg_rdata, m_reg[r]);
      end
    end
  endtask

  // One processor clock with the model stepped alongside.
  task automatic step_both();
    logic st;
    logic [31:0] sa, sd;
    model_step(st, sa, sd);
    checks++;
    if (dmem_we !== st || (st && (dmem_addr !== sa || dmem_wdata !== sd))) begin
      failures++;
      $display("FAIL store at pc=%h: we=%b addr=%h data=%h expected we=%b addr=%h data=%h",
               pc, dmem_we, dmem_addr, dmem_wdata, st, sa, sd);
    end
    @(posedge clk); #1;
    compare_state("after step");
  endtask

  task automatic expect_reg(int r, logic [31:0] v);
    dbg_raddr = 5'(r); #0.1;
    checks++;
    if (dbg_rdata !== v) begin
      failures++;
      $display("FAIL final r%0d=%h expected %h", r, dbg_rdata, v);
    end
  endtask

  // ---------------- test ----------------
  logic [31:0] prog[$];
  int cycles;

  initial begin
    // ===== phase 1: array sum =====
    // data: word0 = 4 (stride), word1 = 52 (end address), word2 = 32
    // (start address), words 8..12 = array
    for (int i = 0; i < DW; i++) m_dmem[i] = 0;
    m_dmem[0] = 4; m_dmem[1] = 52; m_dmem[2] = 32;
    m_dmem[8] = 10; m_dmem[9] = 32'hFFFF_FFFD; m_dmem[10] = 100;
    m_dmem[11] = 7; m_dmem[12] = 32'h0000_1000;
    for (int i = 0; i < DW; i++) dut.u_dmem.mem[i] = m_dmem[i];
    prog = {};
    prog.push_back(lw(1, 0, 0));       //  0: r1 = 4
    prog.push_back(lw(2, 4, 0));       //  4: r2 = 52
    prog.push_back(lw(3, 8, 0));       //  8: r3 = 32
    prog.push_back(add_(4, 0, 0));     // 12: r4 = 0
    prog.push_back(lw(5, 0, 3));       // 16: loop: r5 = mem[r3]
    prog.push_back(add_(4, 4, 5));     // 20: r4 += r5
    prog.push_back(add_(3, 3, 1));     // 24: r3 += 4
    prog.push_back(beq(3, 2, 1));      // 28: if r3 == r2 goto 36
    prog.push_back(beq(0, 0, -5));     // 32: goto 16
    prog.push_back(sw(4, 12, 0));      // 36: mem[3] = sum
    prog.push_back(sub_(6, 2, 1));     // 40: r6 = 52 - 4 = 48
    prog.push_back(slt_(7, 1, 2));     // 44: r7 = (4 < 52) = 1
    prog.push_back(slt_(8, 2, 1));     // 48: r8 = 0
    prog.push_back(and_(9, 4, 2));     // 52: r9 = sum & 52
    prog.push_back(or_(10, 4, 1));     // 56: r10 = sum | 4
    prog.push_back(add_(0, 1, 1));     // 60: r0 stays 0
    prog.push_back(slt_(11, 5, 0));    // 64: r11 = (0x1000 < 0) = 0
    prog.push_back(sub_(12, 0, 1));    // 68: r12 = -4
    prog.push_back(slt_(13, 12, 0));   // 72: r13 = (-4 < 0) = 1
    prog.push_back(beq(0, 0, -1));     // 76: halt (branch to self)
    reset_cpu();
    load_program(prog);
    rst_n = 1;
    // 4 setup + 5 loop iterations of 5 instructions - 1 (last goto not run)
    // = 28 instructions to reach address 36, then 10 more to reach the halt
    cycles = 0;
    while (pc != 32'd36 && cycles < 100) begin
      step_both(); cycles++;
    end
    checks++;
    if (cycles != 28) begin
      failures++;
      $display("FAIL loop took %0d cycles, expected 28 (one instruction per clock)", cycles);
    end
    repeat (15) step_both();
    checks++;
    if (pc !== 32'd76) begin failures++; $display("FAIL not halted, pc=%h", pc); end
    // hand-computed results: sum = 10 - 3 + 100 + 7 + 4096 = 4210 = 0x1072
    expect_reg(4, 32'd4210);
    expect_reg(3, 32'd52);
    expect_reg(6, 32'd48);
    expect_reg(7, 32'd1);
    expect_reg(8, 32'd0);
    expect_reg(9, 32'd4210 & 32'd52);
    expect_reg(10, 32'd4210 | 32'd4);
    expect_reg(0, 32'd0);
    expect_reg(11, 32'd0);
    expect_reg(12, 32'hFFFF_FFFC);
    expect_reg(13, 32'd1);
    checks++;
    if (dut.u_dmem.mem[3] !== 32'd4210) begin
      failures++;
      $display("FAIL stored sum %h", dut.u_dmem.mem[3]);
    end

    // ===== phase 2: random programs in lockstep with the model =====
    for (int run = 0; run < 4; run++) begin
      for (int i = 0; i < DW; i++) begin
        m_dmem[i] = (i % 3 == 0) ? 32'($urandom % 8) : $urandom;
        dut.u_dmem.mem[i] = m_dmem[i];
      end
      prog = {};
      // start by loading a few registers from memory
      for (int r = 1; r < 8; r++) prog.push_back(lw(r, 4 * r, 0));
      while (prog.size() < IW) begin
        int k;
        k = $urandom % 16;
        case (k)
          0: prog.push_back(add_($urandom % 8, $urandom % 8, $urandom % 8));
          1: prog.push_back(sub_($urandom % 8, $urandom % 8, $urandom % 8));
          2: prog.push_back(and_($urandom % 8, $urandom % 8, $urandom % 8));
          3: prog.push_back(or_($urandom % 8, $urandom % 8, $urandom % 8));
          4: prog.push_back(slt_($urandom % 8, $urandom % 8, $urandom % 8));
          5, 6: prog.push_back(lw($urandom % 8, 4 * ($urandom % DW), 0));
          7, 8: prog.push_back(sw($urandom % 8, 4 * ($urandom % DW), 0));
          9: prog.push_back(beq($urandom % 4, $urandom % 4, ($urandom % 4)));
          10: prog.push_back(beq(1 + $urandom % 3, 4 + $urandom % 4, -int'($urandom % 3) - 2));
          11: prog.push_back(r_op(6'h21, $urandom % 8, $urandom % 8, $urandom % 8));
          12: prog.push_back(add_($urandom % 8, $urandom % 8, $urandom % 8));
          13: prog.push_back(slt_($urandom % 8, $urandom % 8, $urandom % 8));
          default: prog.push_back(sub_($urandom % 8, $urandom % 8, $urandom % 8));
        endcase
      end
      reset_cpu();
      load_program(prog);
      rst_n = 1;
      repeat (600) step_both();
    end

    // ===== mechanism coverage =====
    $display("lw=%0d sw=%0d beq_taken=%0d beq_not_taken=%0d backward_branch=%0d",
             n_lw, n_sw, n_beq_taken, n_beq_not, n_back_branch);
    $display("add=%0d sub=%0d and=%0d or=%0d slt_true=%0d slt_false=%0d r0_write=%0d no_op=%0d",
             n_add, n_sub, n_and, n_or, n_slt_true, n_slt_false, n_r0_write, n_nop);
    begin
      int counts[13];
      counts = '{n_lw, n_sw, n_beq_taken, n_beq_not, n_back_branch, n_add, n_sub,
                         n_and, n_or, n_slt_true, n_slt_false, n_r0_write, n_nop};
      foreach (counts[i]) begin
        checks++;
        if (counts[i] == 0) begin
          failures++;
          $display("FAIL mechanism %0d never exercised", i);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
