// tb_control_unit: for every supported instruction, and for a few unsupported
// encodings, compares the decoded control lines with a hand-written table of
// the expected values.
module tb_control_unit;
  import mips_pkg::*;
  int checks = 0, failures = 0;
  logic [5:0] opcode, funct;
  ctrl_t ctrl;
  logic sign_ext;
  control_unit dut (.opcode, .funct, .ctrl, .sign_ext);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected: alu, src, dst, br, mrd, mwr, mbyte, muns, rwr, m2r, sext
  task automatic t(input string nm, input logic [5:0] op, input logic [5:0] fn,
                   input alu_op_e alu, input logic src, input logic dst, input branch_e br,
                   input logic mrd, input logic mwr, input logic mby, input logic mun,
                   input logic rwr, input logic m2r, input logic sx);
    opcode = op; funct = fn;
    #1;
    checks++;
    if ((ctrl.ex.branch != BR_NONE || ctrl.wb.reg_write || ctrl.mem.mem_read ||
         ctrl.mem.mem_write || alu != ALU_ADD) && ctrl.ex.alu_op !== alu ||
        ctrl.ex.alu_src !== src || ctrl.ex.reg_dst !== dst || ctrl.ex.branch !== br ||
        ctrl.mem.mem_read !== mrd || ctrl.mem.mem_write !== mwr ||
        ctrl.mem.mem_byte !== mby || ctrl.mem.mem_unsigned !== mun ||
        ctrl.wb.reg_write !== rwr || ctrl.wb.mem_to_reg !== m2r ||
        ((src || br != BR_NONE) && sign_ext !== sx)) begin
      failures++;
      $display("FAIL %s: ctrl=%p sign_ext=%b", nm, ctrl, sign_ext);
    end
  endtask

  initial begin
    t("add",   6'h00, 6'h20, ALU_ADD,  0, 1, BR_NONE, 0, 0, 0, 0, 1, 0, 1);
    t("addu",  6'h00, 6'h21, ALU_ADD,  0, 1, BR_NONE, 0, 0, 0, 0, 1, 0, 1);
    t("sub",   6'h00, 6'h22, ALU_SUB,  0, 1, BR_NONE, 0, 0, 0, 0, 1, 0, 1);
    t("subu",  6'h00, 6'h23, ALU_SUB,  0, 1, BR_NONE, 0, 0, 0, 0, 1, 0, 1);
    t("and",   6'h00, 6'h24, ALU_AND,  0, 1, BR_NONE, 0, 0, 0, 0, 1, 0, 1);
    t("or",    6'h00, 6'h25, ALU_OR,   0, 1, BR_NONE, 0, 0, 0, 0, 1, 0, 1);
    t("xor",   6'h00, 6'h26, ALU_XOR,  0, 1, BR_NONE, 0, 0, 0, 0, 1, 0, 1);
    t("nor",   6'h00, 6'h27, ALU_NOR,  0, 1, BR_NONE, 0, 0, 0, 0, 1, 0, 1);
    t("slt",   6'h00, 6'h2A, ALU_SLT,  0, 1, BR_NONE, 0, 0, 0, 0, 1, 0, 1);
    t("sltu",  6'h00, 6'h2B, ALU_SLTU, 0, 1, BR_NONE, 0, 0, 0, 0, 1, 0, 1);
    t("sll",   6'h00, 6'h00, ALU_SLL,  0, 1, BR_NONE, 0, 0, 0, 0, 1, 0, 1);
    t("srl",   6'h00, 6'h02, ALU_SRL,  0, 1, BR_NONE, 0, 0, 0, 0, 1, 0, 1);
    t("sra",   6'h00, 6'h03, ALU_SRA,  0, 1, BR_NONE, 0, 0, 0, 0, 1, 0, 1);
    t("mfhi",  6'h00, 6'h10, ALU_MFHI, 0, 1, BR_NONE, 0, 0, 0, 0, 1, 0, 1);
    t("mflo",  6'h00, 6'h12, ALU_MFLO, 0, 1, BR_NONE, 0, 0, 0, 0, 1, 0, 1);
    t("mult",  6'h00, 6'h18, ALU_MULT, 0, 1, BR_NONE, 0, 0, 0, 0, 0, 0, 1);
    t("multu", 6'h00, 6'h19, ALU_MULTU,0, 1, BR_NONE, 0, 0, 0, 0, 0, 0, 1);
    t("addi",  6'h08, 6'h3F, ALU_ADD,  1, 0, BR_NONE, 0, 0, 0, 0, 1, 0, 1);
    t("addiu", 6'h09, 6'h00, ALU_ADD,  1, 0, BR_NONE, 0, 0, 0, 0, 1, 0, 1);
    t("slti",  6'h0A, 6'h00, ALU_SLT,  1, 0, BR_NONE, 0, 0, 0, 0, 1, 0, 1);
    t("sltiu", 6'h0B, 6'h00, ALU_SLTU, 1, 0, BR_NONE, 0, 0, 0, 0, 1, 0, 1);
    t("andi",  6'h0C, 6'h00, ALU_AND,  1, 0, BR_NONE, 0, 0, 0, 0, 1, 0, 0);
    t("ori",   6'h0D, 6'h00, ALU_OR,   1, 0, BR_NONE, 0, 0, 0, 0, 1, 0, 0);
    t("xori",  6'h0E, 6'h00, ALU_XOR,  1, 0, BR_NONE, 0, 0, 0, 0, 1, 0, 0);
    t("lui",   6'h0F, 6'h00, ALU_LUI,  1, 0, BR_NONE, 0, 0, 0, 0, 1, 0, 1);
    t("lw",    6'h23, 6'h00, ALU_ADD,  1, 0, BR_NONE, 1, 0, 0, 0, 1, 1, 1);
    t("lb",    6'h20, 6'h00, ALU_ADD,  1, 0, BR_NONE, 1, 0, 1, 0, 1, 1, 1);
    t("lbu",   6'h24, 6'h00, ALU_ADD,  1, 0, BR_NONE, 1, 0, 1, 1, 1, 1, 1);
    t("sw",    6'h2B, 6'h00, ALU_ADD,  1, 0, BR_NONE, 0, 1, 0, 0, 0, 0, 1);
    t("sb",    6'h28, 6'h00, ALU_ADD,  1, 0, BR_NONE, 0, 1, 1, 0, 0, 0, 1);
    t("beq",   6'h04, 6'h00, ALU_SUB,  0, 0, BR_EQ,   0, 0, 0, 0, 0, 0, 1);
    t("bne",   6'h05, 6'h00, ALU_SUB,  0, 0, BR_NE,   0, 0, 0, 0, 0, 0, 1);
    t("blez",  6'h06, 6'h00, ALU_SUB,  0, 0, BR_LEZ,  0, 0, 0, 0, 0, 0, 1);
    t("bgtz",  6'h07, 6'h00, ALU_SUB,  0, 0, BR_GTZ,  0, 0, 0, 0, 0, 0, 1);
    t("j",     6'h02, 6'h00, ALU_ADD,  0, 0, BR_J,    0, 0, 0, 0, 0, 0, 1);
    // unsupported encodings decode as a no-op
    t("op3F",  6'h3F, 6'h00, ALU_ADD,  0, 0, BR_NONE, 0, 0, 0, 0, 0, 0, 1);
    t("fn3F",  6'h00, 6'h3F, ALU_ADD,  0, 0, BR_NONE, 0, 0, 0, 0, 0, 0, 1);
    t("fn08",  6'h00, 6'h08, ALU_ADD,  0, 0, BR_NONE, 0, 0, 0, 0, 0, 0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
