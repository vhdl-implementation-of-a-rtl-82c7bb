// tb_ex_stage: feeds hand-built ID/EX contents and checks EX/MEM: an
// immediate add, a dependent add whose stale operand must be replaced from
// EX/MEM, an operand taken from MEM/WB, store data forwarding, a taken and a
// not-taken BEQ with their target, and the J target.
module tb_ex_stage;
  import mips_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  idex_t idex = '0;
  logic [4:0] memwb_dest = 0;
  logic memwb_reg_write = 0;
  logic [31:0] wb_data = 0, branch_target;
  exmem_t exmem;
  logic branch_taken;
  logic [1:0] fwd_a, fwd_b;

  ex_stage dut (.*);
  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_true(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic idex_t mk(input alu_op_e op, input logic src, input logic dst,
                               input int rs, input logic [31:0] rsv, input int rt,
                               input logic [31:0] rtv, input int rd, input logic [31:0] imm,
                               input logic wr);
    idex_t x = '0;
    x.ctrl.ex.alu_op = op; x.ctrl.ex.alu_src = src; x.ctrl.ex.reg_dst = dst;
    x.ctrl.wb.reg_write = wr;
    x.rs = 5'(rs); x.rs_val = rsv; x.rt = 5'(rt); x.rt_val = rtv; x.rd = 5'(rd);
    x.imm = imm; x.imm_sh = {imm[29:0], 2'b00};
    return x;
  endfunction

  initial begin
    #12 rst_n = 1;
    // addi r1, r0, 5
    @(negedge clk); idex = mk(ALU_ADD, 1, 0, 0, 0, 1, 32'hDEAD, 0, 5, 1);
    @(posedge clk); #1;
    expect_true(exmem.alu_result == 5 && exmem.dest == 1 && exmem.wb.reg_write, "addi r1");
    // add r2, r1, r1 with stale register values: both from EX/MEM
    @(negedge clk); idex = mk(ALU_ADD, 0, 1, 1, 32'h0, 1, 32'h0, 2, 0, 1);
    #1; expect_true(fwd_a == 2'b10 && fwd_b == 2'b10, "EX/MEM selected");
    @(posedge clk); #1;
    expect_true(exmem.alu_result == 10 && exmem.dest == 2, "add r2 = 10 by forwarding");
    // sub r3, r7, r2: r2 from EX/MEM (10), r7 from MEM/WB (100)
    @(negedge clk);
    memwb_dest = 7; memwb_reg_write = 1; wb_data = 100;
    idex = mk(ALU_SUB, 0, 1, 7, 32'h0, 2, 32'h0, 3, 0, 1);
    #1; expect_true(fwd_a == 2'b01 && fwd_b == 2'b10, "MEM/WB and EX/MEM selected");
    @(posedge clk); #1;
    expect_true(exmem.alu_result == 90, "sub r3 = 100 - 10");
    // sw r3, 8(r0): store data forwarded from EX/MEM
    @(negedge clk);
    memwb_reg_write = 0;
    idex = mk(ALU_ADD, 1, 0, 0, 0, 3, 32'h0, 0, 8, 0);
    idex.ctrl.mem.mem_write = 1;
    @(posedge clk); #1;
    expect_true(exmem.alu_result == 8 && exmem.store_data == 90 && exmem.mem.mem_write,
                "sw address and forwarded data");
    // beq r4, r5 (equal) -> taken, target pc4 + (3 << 2)
    @(negedge clk);
    idex = mk(ALU_SUB, 0, 0, 4, 32'h77, 5, 32'h77, 0, 3, 0);
    idex.ctrl.ex.branch = BR_EQ; idex.pc4 = 32'h100;
    #1; expect_true(branch_taken && branch_target == 32'h10C, "beq taken, target");
    // beq r4, r5 (different) -> not taken
    idex.rt_val = 32'h78;
    #1; expect_true(!branch_taken, "beq not taken");
    // bgtz on a negative value -> not taken; on positive -> taken
    idex = mk(ALU_SUB, 0, 0, 4, 32'hFFFF_FFF0, 0, 32'h0, 0, 1, 0);
    idex.ctrl.ex.branch = BR_GTZ;
    #1; expect_true(!branch_taken, "bgtz negative");
    idex.rs_val = 32'h5;
    #1; expect_true(branch_taken, "bgtz positive");
    // j 0x40 from pc4 = 0x1000_0010
    idex = '0; idex.ctrl.ex.branch = BR_J; idex.jidx = 26'h10; idex.pc4 = 32'h1000_0010;
    #1; expect_true(branch_taken && branch_target == 32'h1000_0040, "j target");
    // mult then mfhi through the stage
    @(negedge clk);
    idex = mk(ALU_MULT, 0, 1, 8, 32'h0001_0000, 9, 32'h0003_0000, 0, 0, 0);
    @(negedge clk);
    idex = mk(ALU_MFHI, 0, 1, 0, 0, 0, 0, 10, 0, 1);
    @(posedge clk); #1;
    expect_true(exmem.alu_result == 3 && exmem.dest == 10, "mfhi after mult");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
