// mips_cpu: five-stage pipelined MIPS-32 processor (top level).
//
// Connects fetch, decode, execute, memory and write-back. Every stage holds
// its own output register (IF/ID, ID/EX, EX/MEM, MEM/WB), so the top is only
// wiring. Data hazards are removed by forwarding ALU and memory results to
// the ALU inputs and by a register bank that returns a value written in the
// same cycle; a load followed at once by a user of its result costs one stall
// cycle. Branches and jumps are resolved in EX; a taken one redirects the PC
// and discards the single instruction fetched after the delay slot.
//
// Outside access: while the CPU runs or is held in reset a host can write the
// instruction memory (imem_we, imem_addr = byte address, imem_wdata) and read
// any register (dbg_reg_addr -> dbg_reg_data, combinational). pc is the
// current fetch address. Status outputs show, each cycle, a load-use stall
// (stall), a taken branch or jump in EX (branch_taken) and the forwarding
// selects of the two ALU operands (fwd_a, fwd_b: 00 register bank,
// 10 EX/MEM, 01 MEM/WB). rst_n is active low and asynchronous.
// Defaults: 32-word (1 kbit) instruction memory, 128-byte data memory.
// The stage split, the hazard and forwarding scheme and the memory sizes
// follow the reference description of this pipeline; the branch delay slot,
// the debug and status ports and the reset scheme are this design's own.
module mips_cpu
  import mips_pkg::*;
#(
  parameter int unsigned IMEM_WORDS = 32,
  parameter int unsigned DMEM_BYTES = 128
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        imem_we,
  input  logic [31:0] imem_addr,
  input  logic [31:0] imem_wdata,
  input  logic [4:0]  dbg_reg_addr,
  output logic [31:0] dbg_reg_data,
  output logic [31:0] pc,
  output logic        stall,
  output logic        branch_taken,
  output logic [1:0]  fwd_a,
  output logic [1:0]  fwd_b
);
  ifid_t  ifid;
  idex_t  idex;
  exmem_t exmem;
  memwb_t memwb;

  logic        pc_write, pc_src, ifid_write, ifid_flush;
  logic [31:0] branch_target;
  logic        rf_we;
  logic [4:0]  rf_waddr;
  logic [31:0] rf_wdata;

  if_stage #(.IMEM_WORDS(IMEM_WORDS)) u_if (
    .clk, .rst_n,
    .pc_write, .pc_src, .branch_target, .ifid_write, .ifid_flush,
    .imem_we, .imem_addr, .imem_wdata,
    .ifid, .pc
  );

  id_stage u_id (
    .clk, .rst_n, .ifid, .branch_taken,
    .rf_we, .rf_waddr, .rf_wdata,
    .dbg_addr(dbg_reg_addr), .dbg_data(dbg_reg_data),
    .idex, .pc_write, .pc_src, .ifid_write, .ifid_flush, .stall
  );

  ex_stage u_ex (
    .clk, .rst_n, .idex,
    .memwb_dest(memwb.dest), .memwb_reg_write(memwb.wb.reg_write),
    .wb_data(rf_wdata),
    .exmem, .branch_taken, .branch_target, .fwd_a, .fwd_b
  );

  mem_stage #(.DMEM_BYTES(DMEM_BYTES)) u_mem (
    .clk, .rst_n, .exmem, .memwb
  );

  wb_stage u_wb (.memwb, .rf_we, .rf_waddr, .rf_wdata);
endmodule
