// tb_mips_cpu: end-to-end test of the pipelined CPU at its default sizes
// (32-word instruction memory, 128-byte data memory).
//
// A 30-instruction program is assembled here, loaded through the host port
// while the CPU is in reset, and run. It exercises immediate and register
// adds and subtracts, signed and unsigned multiply with MFHI/MFLO, word and
// byte stores and loads (LB sign-extends, LBU does not), a counted loop that
// leaves with a taken BEQ and returns to address 0 with J, branch delay slots,
// load-use stalls and both forwarding paths. At the end every register the
// program writes is read through the debug port and compared with values
// worked out by hand. On every taken branch the test also checks that the
// target instruction reaches decode exactly two cycles later (delay slot plus
// one discarded fetch). Each pipeline mechanism is counted and must occur.
module tb_mips_cpu;
  import mips_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic imem_we = 0;
  logic [31:0] imem_addr = 0, imem_wdata = 0, dbg_reg_data, pc;
  logic [4:0] dbg_reg_addr = 0;
  logic stall, branch_taken;
  logic [1:0] fwd_a, fwd_b;

  mips_cpu dut (.*);
  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- tiny assembler ----
  function automatic logic [31:0] R(input int fn, input int rd, input int rs, input int rt);
    return {6'h00, 5'(rs), 5'(rt), 5'(rd), 5'd0, 6'(fn)};
  endfunction
  function automatic logic [31:0] I(input int op, input int rt, input int rs, input int imm);
    return {6'(op), 5'(rs), 5'(rt), 16'(imm)};
  endfunction
  function automatic logic [31:0] J(input int word);
    return {6'h02, 26'(word)};
  endfunction

  logic [31:0] prog [30];
  initial begin
    prog[0]  = I('h08, 1, 0, 1);         // addi  $1, $0, 1
    prog[1]  = I('h08, 2, 0, 2);         // addi  $2, $0, 2
    prog[2]  = R('h20, 3, 1, 2);         // add   $3, $1, $2      = 3
    prog[3]  = R('h22, 4, 2, 3);         // sub   $4, $2, $3      = -1
    prog[4]  = I('h2B, 4, 0, 0);         // sw    $4, 0($0)
    prog[5]  = I('h23, 5, 0, 0);         // lw    $5, 0($0)       = -1
    prog[6]  = R('h18, 0, 5, 5);         // mult  $5, $5          (load-use stall)
    prog[7]  = R('h12, 6, 0, 0);         // mflo  $6              = 1
    prog[8]  = R('h10, 7, 0, 0);         // mfhi  $7              = 0
    prog[9]  = R('h19, 0, 5, 5);         // multu $5, $5
    prog[10] = R('h10, 8, 0, 0);         // mfhi  $8              = 0xFFFFFFFE
    prog[11] = I('h08, 10, 0, -128);     // addi  $10, $0, -128
    prog[12] = I('h28, 10, 0, 6);        // sb    $10, 6($0)
    prog[13] = I('h20, 9, 0, 6);         // lb    $9, 6($0)       = 0xFFFFFF80
    prog[14] = I('h24, 11, 0, 6);        // lbu   $11, 6($0)      = 0x80
    prog[15] = I('h08, 12, 12, 1);       // addi  $12, $12, 1     loop counter
    prog[16] = I('h0A, 13, 12, 3);       // slti  $13, $12, 3
    prog[17] = I('h04, 0, 13, 3);        // beq   $13, $0, +3 -> word 21
    prog[18] = I('h08, 14, 14, 1);       // addi  $14, $14, 1     delay slot
    prog[19] = J(0);                     // j     0
    prog[20] = I('h08, 15, 15, 1);       // addi  $15, $15, 1     delay slot
    prog[21] = I('h2B, 12, 0, 8);        // sw    $12, 8($0)
    prog[22] = I('h23, 17, 0, 8);        // lw    $17, 8($0)      = 3
    prog[23] = R('h20, 18, 17, 17);      // add   $18, $17, $17   = 6 (load-use stall)
    prog[24] = I('h08, 19, 0, 7);        // addi  $19, $0, 7
    prog[25] = NOP;
    prog[26] = NOP;
    prog[27] = R('h20, 20, 19, 0);       // add   $20, $19, $0    = 7 (register bank bypass)
    prog[28] = J(28);                    // j     28              halt loop
    prog[29] = NOP;
  end

  // ---- mechanism counters ----
  int n_stall = 0, n_taken = 0, n_not_taken = 0, n_fwd_ex = 0, n_fwd_wb = 0;
  int n_rf_bypass = 0, n_hilo = 0, n_flush_ok = 0, cycles = 0, halt_cycle = -1;
  logic [31:0] pending_target [$];
  int pending_when [$];

  always @(posedge clk) if (rst_n) begin
    cycles++;
    if (stall) n_stall++;
    if (branch_taken) begin
      n_taken++;
      pending_target.push_back(dut.branch_target);
      pending_when.push_back(cycles + 2);
    end
    if (dut.idex.ctrl.ex.branch inside {BR_EQ, BR_NE, BR_LEZ, BR_GTZ} && !branch_taken)
      n_not_taken++;
    if (dut.idex.ctrl.ex.alu_op inside {ALU_ADD, ALU_SUB} &&
        (fwd_a == 2'b10 || fwd_b == 2'b10)) n_fwd_ex++;
    if (fwd_a == 2'b01 || fwd_b == 2'b01) n_fwd_wb++;
    if (dut.idex.ctrl.ex.alu_op inside {ALU_MFHI, ALU_MFLO}) n_hilo++;
    if (dut.rf_we && dut.rf_waddr != 0 && dut.rf_waddr == dut.ifid.instr[25:21] &&
        dut.ifid.instr != NOP) n_rf_bypass++;
    // the branch target must be in decode two cycles after the decision
    if (pending_when.size() > 0 && pending_when[0] == cycles) begin
      checks++;
      if (dut.ifid.pc4 !== pending_target[0] + 4) begin
        failures++;
        $display("FAIL branch to %h: decode holds pc4=%h", pending_target[0], dut.ifid.pc4);
      end else n_flush_ok++;
      void'(pending_target.pop_front());
      void'(pending_when.pop_front());
    end
  end

  // clock edges after reset until the halt loop (word 28) is first fetched
  always @(negedge clk) if (rst_n && pc == 32'd112 && halt_cycle < 0) halt_cycle = cycles;

  task automatic reg_check(input int r, input logic [31:0] e);
    dbg_reg_addr = 5'(r);
    #1;
    checks++;
    if (dbg_reg_data !== e) begin
      failures++;
      $display("FAIL $%0d = %h, expected %h", r, dbg_reg_data, e);
    end
  endtask

  task automatic count_check(input string nm, input int n);
    checks++;
    $display("%-28s %0d", nm, n);
    if (n == 0) begin failures++; $display("FAIL mechanism never seen: %s", nm); end
  endtask

  initial begin
    #3;
    for (int i = 0; i < 32; i++) begin
      @(negedge clk);
      imem_we = 1; imem_addr = 32'(i * 4); imem_wdata = (i < 30) ? prog[i] : NOP;
    end
    @(negedge clk); imem_we = 0;
    rst_n = 1;
    wait (pc == 32'd112);
    repeat (20) @(posedge clk);
    @(negedge clk);
    reg_check(0, 0);
    reg_check(1, 1);
    reg_check(2, 2);
    reg_check(3, 3);
    reg_check(4, 32'hFFFF_FFFF);
    reg_check(5, 32'hFFFF_FFFF);
    reg_check(6, 1);
    reg_check(7, 0);
    reg_check(8, 32'hFFFF_FFFE);
    reg_check(9, 32'hFFFF_FF80);
    reg_check(10, 32'hFFFF_FF80);
    reg_check(11, 32'h0000_0080);
    reg_check(12, 3);
    reg_check(13, 0);
    reg_check(14, 3);    // beq delay slot ran on each of 3 passes
    reg_check(15, 2);    // j delay slot ran on each of 2 jumps back
    reg_check(16, 0);    // never written
    reg_check(17, 3);
    reg_check(18, 6);
    reg_check(19, 7);
    reg_check(20, 7);
    count_check("load-use stalls", n_stall);
    count_check("taken branches/jumps", n_taken);
    count_check("branches not taken", n_not_taken);
    count_check("forwards from EX/MEM", n_fwd_ex);
    count_check("forwards from MEM/WB", n_fwd_wb);
    count_check("register bank bypasses", n_rf_bypass);
    count_check("MFHI/MFLO reads", n_hilo);
    count_check("one-bubble branch penalty", n_flush_ok);
    // one stall in each of the three loop passes (lw $5 -> mult), one after
    // the loop (lw $17 -> add)
    checks++;
    if (n_stall != 4) begin failures++; $display("FAIL expected 4 stalls, saw %0d", n_stall); end
    // Expected fetch timing: each of the first two passes reaches PC 0 again
    // 23 edges after it started (words 0..21 = 21 steps, one load-use hold,
    // one step to the target); the third pass takes 21 edges to reach word 21
    // (19 steps, one hold, one step to the target); words 21..28 take 7 steps
    // and one hold. 23 + 23 + 21 + 8 = 75.
    checks++;
    if (halt_cycle != 75) begin
      failures++;
      $display("FAIL halt address fetched after %0d edges, expected 75", halt_cycle);
    end
    $display("cycles run: %0d (halt reached after %0d)", cycles, halt_cycle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
