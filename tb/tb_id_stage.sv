// tb_id_stage: writes registers through the write-back port, then decodes
// hand-encoded instructions and checks the ID/EX register: operand values,
// register numbers, immediates and key control lines. Also checks the
// load-use stall (PC and IF/ID held, bubble into ID/EX), the branch redirect
// controls, and reading a register in the cycle it is written.
module tb_id_stage;
  import mips_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, branch_taken = 0;
  ifid_t ifid = '{instr: 32'h0, pc4: 32'h0};
  logic rf_we = 0;
  logic [4:0] rf_waddr = 0, dbg_addr = 0;
  logic [31:0] rf_wdata = 0, dbg_data;
  idex_t idex;
  logic pc_write, pc_src, ifid_write, ifid_flush, stall;

  id_stage dut (.*);
  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] r_type(input int rs, input int rt, input int rd,
                                         input int sh, input int fn);
    return {6'h00, 5'(rs), 5'(rt), 5'(rd), 5'(sh), 6'(fn)};
  endfunction
  function automatic logic [31:0] i_type(input int op, input int rs, input int rt, input int imm);
    return {6'(op), 5'(rs), 5'(rt), 16'(imm)};
  endfunction

  task automatic expect_true(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic decode(input logic [31:0] instr, input logic [31:0] pc4);
    @(negedge clk);
    ifid = '{instr: instr, pc4: pc4};
    @(posedge clk); #1;
  endtask

  initial begin
    #12 rst_n = 1;
    // load r1..r7 with (k * 0x11111111)
    for (int k = 1; k < 8; k++) begin
      @(negedge clk);
      rf_we = 1; rf_waddr = 5'(k); rf_wdata = 32'(k) * 32'h1111_1111;
    end
    @(negedge clk); rf_we = 0;
    dbg_addr = 5'd3; #1;
    expect_true(dbg_data == 32'h3333_3333, "debug read r3");

    // add r8, r1, r2
    decode(r_type(1, 2, 8, 0, 'h20), 32'h40);
    expect_true(idex.rs_val == 32'h1111_1111 && idex.rt_val == 32'h2222_2222, "add operands");
    expect_true(idex.rs == 1 && idex.rt == 2 && idex.rd == 8 && idex.pc4 == 32'h40, "add fields");
    expect_true(idex.ctrl.ex.alu_op == ALU_ADD && idex.ctrl.ex.reg_dst && idex.ctrl.wb.reg_write,
                "add control");
    // andi r9, r3, 0x8001: zero-extended
    decode(i_type('h0C, 3, 9, 'h8001), 32'h44);
    expect_true(idex.imm == 32'h0000_8001 && idex.ctrl.ex.alu_src && !idex.ctrl.ex.reg_dst,
                "andi zero extension");
    // beq r4, r5, -2: sign-extended and shifted
    decode(i_type('h04, 4, 5, 'hFFFE), 32'h48);
    expect_true(idex.imm == 32'hFFFF_FFFE && idex.imm_sh == 32'hFFFF_FFF8 &&
                idex.ctrl.ex.branch == BR_EQ, "beq immediate");
    // j 0x123
    decode({6'h02, 26'h123}, 32'h4C);
    expect_true(idex.jidx == 26'h123 && idex.ctrl.ex.branch == BR_J, "j index");
    // read of a register written in the same cycle
    @(negedge clk);
    ifid = '{instr: r_type(6, 0, 10, 0, 'h21), pc4: 32'h50};
    rf_we = 1; rf_waddr = 5'd6; rf_wdata = 32'hCAFE_F00D;
    @(posedge clk); #1; rf_we = 0;
    expect_true(idex.rs_val == 32'hCAFE_F00D, "same-cycle write then read");

    // load-use: lw r5, 0(r0) then add r11, r5, r1
    decode(i_type('h23, 0, 5, 0), 32'h54);
    expect_true(idex.ctrl.mem.mem_read && idex.rt == 5, "lw in ID/EX");
    @(negedge clk);
    ifid = '{instr: r_type(5, 1, 11, 0, 'h20), pc4: 32'h58};
    #1;
    expect_true(stall && !pc_write && !ifid_write, "load-use stall raised");
    @(posedge clk); #1;
    expect_true(idex.ctrl == '0, "bubble in ID/EX");
    expect_true(!stall && pc_write && ifid_write, "stall lasts one cycle");
    @(posedge clk); #1;
    expect_true(idex.ctrl.ex.alu_op == ALU_ADD && idex.rd == 11 && idex.ctrl.wb.reg_write,
                "dependent add issued after stall");
    // load followed by an independent instruction: no stall
    decode(i_type('h23, 0, 7, 4), 32'h5C);
    @(negedge clk);
    ifid = '{instr: r_type(1, 2, 12, 0, 'h20), pc4: 32'h60};
    #1;
    expect_true(!stall, "no stall without dependency");
    // a load into r0 never stalls
    decode(i_type('h23, 0, 0, 4), 32'h64);
    @(negedge clk);
    ifid = '{instr: r_type(0, 0, 12, 0, 'h20), pc4: 32'h68};
    #1;
    expect_true(!stall, "no stall on r0");
    // branch taken from EX
    branch_taken = 1; #1;
    expect_true(pc_src && ifid_flush && pc_write, "branch redirect");
    branch_taken = 0; #1;
    expect_true(!pc_src && !ifid_flush, "no redirect");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
