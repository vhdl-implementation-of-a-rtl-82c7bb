// if_stage: the instruction fetch stage and the IF/ID pipeline register.
//
// Built from the program counter, the PC + 4 adder and the instruction memory.
// Each cycle the instruction at the PC is read and, with PC + 4, clocked into
// IF/ID. The next PC is PC + 4, or the branch target when pc_src is high (a
// taken branch or jump reported from EX). Hazard control from decode:
//   pc_write = 0    holds the PC (stall),
//   ifid_write = 0  holds IF/ID (stall),
//   ifid_flush = 1  loads a no-op into IF/ID instead of the fetched word
//                   (the instruction two after a taken branch).
// The host load port writes the instruction memory directly. Reset clears the
// PC and loads a no-op into IF/ID. The stage buffers its own outputs, as the
// processor description has every stage do.
//
// Interface: clk, rst_n; pc_write, pc_src, branch_target[31:0], ifid_write,
//   ifid_flush; imem_we, imem_addr[31:0], imem_wdata[31:0]
//   -> ifid (ifid_t, registered), pc[31:0].
module if_stage
  import mips_pkg::*;
#(
  parameter int unsigned IMEM_WORDS = 32
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        pc_write,
  input  logic        pc_src,
  input  logic [31:0] branch_target,
  input  logic        ifid_write,
  input  logic        ifid_flush,
  input  logic        imem_we,
  input  logic [31:0] imem_addr,
  input  logic [31:0] imem_wdata,
  output ifid_t       ifid,
  output logic [31:0] pc
);
  logic [31:0] pc4, next_pc, instr;

  program_counter u_pc (
    .clk, .rst_n, .update(pc_write), .next_pc, .pc
  );

  pc_adder u_add (.addr(pc), .sum(pc4));

  instr_mem #(.WORDS(IMEM_WORDS)) u_imem (
    .clk, .we(imem_we), .wr_addr(imem_addr), .wr_data(imem_wdata),
    .rd_addr(pc), .instr
  );

  always_comb next_pc = pc_src ? branch_target : pc4;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          ifid <= '{instr: NOP, pc4: '0};
    else if (ifid_flush) ifid <= '{instr: NOP, pc4: pc4};
    else if (ifid_write) ifid <= '{instr: instr, pc4: pc4};
  end
endmodule
