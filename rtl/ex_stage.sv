// ex_stage: the execute stage and the EX/MEM pipeline register.
//
// The forwarding unit chooses each ALU operand from the ID/EX register value,
// the ALU result in this stage's EX/MEM register, or the write-back value of
// MEM/WB (wb_data). Operand B is the extended immediate instead when alu_src
// is set; the forwarded rt is always kept as the store data. The ALU result
// and flags feed the branch unit, whose decision (branch_taken) goes back to
// decode and fetch together with the target: PC + 4 + (immediate << 2) for a
// conditional branch, {PC+4[31:28], index, 00} for J. The destination register
// is rd or rt by reg_dst. EX/MEM is cleared by reset; every other cycle it
// takes the instruction leaving EX (bubbles arrive with all control zero).
// Deciding branches here, and the three-source forwarding, follow the
// reference description; the J target rule is the MIPS-32 one.
//
// Interface: clk, rst_n; idex (idex_t); memwb_dest[4:0], memwb_reg_write,
//   wb_data[31:0] (from MEM/WB) -> exmem (exmem_t, registered),
//   branch_taken, branch_target[31:0], fwd_a, fwd_b (forwarding selects).
module ex_stage
  import mips_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  idex_t       idex,
  input  logic [4:0]  memwb_dest,
  input  logic        memwb_reg_write,
  input  logic [31:0] wb_data,
  output exmem_t      exmem,
  output logic        branch_taken,
  output logic [31:0] branch_target,
  output logic [1:0]  fwd_a,
  output logic [1:0]  fwd_b
);
  logic [31:0] op_a, fwd_rt, op_b, result;
  logic        zero, negative;
  logic [4:0]  dest;

  forwarding_unit u_fwd (
    .idex_rs(idex.rs), .idex_rt(idex.rt),
    .exmem_dest(exmem.dest), .exmem_reg_write(exmem.wb.reg_write),
    .memwb_dest, .memwb_reg_write,
    .fwd_a, .fwd_b
  );

  function automatic logic [31:0] sel(input logic [1:0] f, input logic [31:0] reg_v);
    unique case (f)
      2'b10:   return exmem.alu_result;
      2'b01:   return wb_data;
      default: return reg_v;
    endcase
  endfunction

  always_comb begin
    op_a   = sel(fwd_a, idex.rs_val);
    fwd_rt = sel(fwd_b, idex.rt_val);
    op_b   = idex.ctrl.ex.alu_src ? idex.imm : fwd_rt;
    dest   = idex.ctrl.ex.reg_dst ? idex.rd : idex.rt;
  end

  alu u_alu (
    .clk, .rst_n,
    .op(idex.ctrl.ex.alu_op), .a(op_a), .b(op_b), .shamt(idex.shamt),
    .result, .zero, .negative
  );

  branch_unit u_br (
    .branch(idex.ctrl.ex.branch), .zero, .negative, .taken(branch_taken)
  );

  always_comb begin
    if (idex.ctrl.ex.branch == BR_J)
      branch_target = {idex.pc4[31:28], idex.jidx, 2'b00};
    else
      branch_target = idex.pc4 + idex.imm_sh;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      exmem <= '0;
    end else begin
      exmem.mem        <= idex.ctrl.mem;
      exmem.wb         <= idex.ctrl.wb;
      exmem.alu_result <= result;
      exmem.store_data <= fwd_rt;
      exmem.dest       <= dest;
    end
  end
endmodule
