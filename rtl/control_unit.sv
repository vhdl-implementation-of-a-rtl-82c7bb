// control_unit: main decoder of the decode stage.
//
// Translates the opcode and, for R-type instructions, the function code into
// the control lines the three later stages need (ctrl_t: EX lines for the ALU,
// operand source, destination register and branch type; MEM lines for the
// data memory; WB lines for the register write), plus sign_ext for the
// immediate extender. It is one large case statement, as the processor
// description says. The instruction subset (adds and subtracts signed and
// unsigned, MULT/MULTU/MFHI/MFLO, logic and shift operations, SLT, LUI,
// LW/SW/LB/LBU/SB, BEQ/BNE/BLEZ/BGTZ and J) is this design's reading of what
// the described CPU runs; unknown encodings decode as a no-op. ADD, ADDI and
// SUB do not raise overflow exceptions: there is no exception logic.
//
// Interface: opcode[5:0], funct[5:0] -> ctrl (ctrl_t), sign_ext. Combinational.
module control_unit
  import mips_pkg::*;
(
  input  logic [5:0] opcode,
  input  logic [5:0] funct,
  output ctrl_t      ctrl,
  output logic       sign_ext
);
  always_comb begin
    ctrl     = '0;          // no-op: nothing written, no memory access
    sign_ext = 1'b1;
    unique case (opcode)
      OP_RTYPE: begin
        ctrl.ex.reg_dst   = 1'b1;
        ctrl.wb.reg_write = 1'b1;
        unique case (funct)
          FN_SLL:   ctrl.ex.alu_op = ALU_SLL;
          FN_SRL:   ctrl.ex.alu_op = ALU_SRL;
          FN_SRA:   ctrl.ex.alu_op = ALU_SRA;
          FN_MFHI:  ctrl.ex.alu_op = ALU_MFHI;
          FN_MFLO:  ctrl.ex.alu_op = ALU_MFLO;
          FN_MULT:  begin ctrl.ex.alu_op = ALU_MULT;  ctrl.wb.reg_write = 1'b0; end
          FN_MULTU: begin ctrl.ex.alu_op = ALU_MULTU; ctrl.wb.reg_write = 1'b0; end
          FN_ADD, FN_ADDU: ctrl.ex.alu_op = ALU_ADD;
          FN_SUB, FN_SUBU: ctrl.ex.alu_op = ALU_SUB;
          FN_AND:   ctrl.ex.alu_op = ALU_AND;
          FN_OR:    ctrl.ex.alu_op = ALU_OR;
          FN_XOR:   ctrl.ex.alu_op = ALU_XOR;
          FN_NOR:   ctrl.ex.alu_op = ALU_NOR;
          FN_SLT:   ctrl.ex.alu_op = ALU_SLT;
          FN_SLTU:  ctrl.ex.alu_op = ALU_SLTU;
          default:  ctrl = '0;
        endcase
      end
      OP_J:    ctrl.ex.branch = BR_J;
      OP_BEQ:  begin ctrl.ex.branch = BR_EQ;  ctrl.ex.alu_op = ALU_SUB; end
      OP_BNE:  begin ctrl.ex.branch = BR_NE;  ctrl.ex.alu_op = ALU_SUB; end
      OP_BLEZ: begin ctrl.ex.branch = BR_LEZ; ctrl.ex.alu_op = ALU_SUB; end
      OP_BGTZ: begin ctrl.ex.branch = BR_GTZ; ctrl.ex.alu_op = ALU_SUB; end
      OP_ADDI, OP_ADDIU: begin
        ctrl.ex.alu_op = ALU_ADD;  ctrl.ex.alu_src = 1'b1; ctrl.wb.reg_write = 1'b1;
      end
      OP_SLTI: begin
        ctrl.ex.alu_op = ALU_SLT;  ctrl.ex.alu_src = 1'b1; ctrl.wb.reg_write = 1'b1;
      end
      OP_SLTIU: begin
        ctrl.ex.alu_op = ALU_SLTU; ctrl.ex.alu_src = 1'b1; ctrl.wb.reg_write = 1'b1;
      end
      OP_ANDI: begin
        ctrl.ex.alu_op = ALU_AND;  ctrl.ex.alu_src = 1'b1; ctrl.wb.reg_write = 1'b1;
        sign_ext = 1'b0;
      end
      OP_ORI: begin
        ctrl.ex.alu_op = ALU_OR;   ctrl.ex.alu_src = 1'b1; ctrl.wb.reg_write = 1'b1;
        sign_ext = 1'b0;
      end
      OP_XORI: begin
        ctrl.ex.alu_op = ALU_XOR;  ctrl.ex.alu_src = 1'b1; ctrl.wb.reg_write = 1'b1;
        sign_ext = 1'b0;
      end
      OP_LUI: begin
        ctrl.ex.alu_op = ALU_LUI;  ctrl.ex.alu_src = 1'b1; ctrl.wb.reg_write = 1'b1;
      end
      OP_LW, OP_LB, OP_LBU: begin
        ctrl.ex.alu_op       = ALU_ADD;
        ctrl.ex.alu_src      = 1'b1;
        ctrl.mem.mem_read    = 1'b1;
        ctrl.mem.mem_byte    = (opcode != OP_LW);
        ctrl.mem.mem_unsigned = (opcode == OP_LBU);
        ctrl.wb.reg_write    = 1'b1;
        ctrl.wb.mem_to_reg   = 1'b1;
      end
      OP_SW, OP_SB: begin
        ctrl.ex.alu_op     = ALU_ADD;
        ctrl.ex.alu_src    = 1'b1;
        ctrl.mem.mem_write = 1'b1;
        ctrl.mem.mem_byte  = (opcode == OP_SB);
      end
      default: ctrl = '0;
    endcase
  end
endmodule
