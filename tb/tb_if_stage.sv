// tb_if_stage: loads the instruction memory through the host port, then runs
// the fetch stage with random stalls, flushes and branch redirects. A
// cycle-level model of the PC and IF/ID register (next PC = PC + 4 or target,
// hold on stall, no-op on flush) is compared with the stage after every edge.
module tb_if_stage;
  import mips_pkg::*;
  int checks = 0, failures = 0, n_stall = 0, n_flush = 0;
  logic clk = 0, rst_n = 0;
  logic pc_write = 1, pc_src = 0, ifid_write = 1, ifid_flush = 0;
  logic [31:0] branch_target = 0, imem_addr = 0, imem_wdata = 0, pc;
  logic imem_we = 0;
  ifid_t ifid;
  logic [31:0] words [32];
  logic [31:0] m_pc, m_instr, m_pc4;

  if_stage #(.IMEM_WORDS(32)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 32; i++) begin
      words[i] = {8'hA5, 8'(i), 16'($urandom)};
      @(negedge clk);
      imem_we = 1; imem_addr = 32'(i * 4); imem_wdata = words[i];
    end
    @(negedge clk); imem_we = 0;
    #1; checks++;
    if (pc !== 0 || ifid.instr !== NOP) begin failures++; $display("FAIL reset state"); end
    m_pc = 0; m_instr = NOP; m_pc4 = 0;
    repeat (400) begin
      logic stall;
      @(negedge clk);
      rst_n = 1;
      stall = ($urandom_range(0, 4) == 0);
      pc_src = !stall && ($urandom_range(0, 5) == 0);
      branch_target = {25'd0, 5'($urandom), 2'b00};
      pc_write = !stall; ifid_write = !stall; ifid_flush = pc_src;
      if (stall) n_stall++;
      if (ifid_flush) n_flush++;
      @(posedge clk);
      if (ifid_flush)      begin m_instr = NOP; m_pc4 = m_pc + 4; end
      else if (ifid_write) begin m_instr = words[m_pc[6:2]]; m_pc4 = m_pc + 4; end
      if (pc_write) m_pc = pc_src ? branch_target : m_pc + 4;
      #1; checks++;
      if (pc !== m_pc || ifid.instr !== m_instr || ifid.pc4 !== m_pc4) begin
        failures++;
        $display("FAIL pc=%h/%h instr=%h/%h pc4=%h/%h", pc, m_pc, ifid.instr, m_instr, ifid.pc4, m_pc4);
      end
    end
    checks++;
    if (n_stall == 0 || n_flush == 0) begin failures++; $display("FAIL coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
