// id_stage: the instruction decode stage and the ID/EX pipeline register.
//
// Splits the instruction held in IF/ID into its fields: rs and rt go to the
// register bank, the 16-bit immediate to the sign extender, opcode and
// function code to the control unit. The hazard detection unit compares the
// IF/ID source registers with the load target held in this stage's own ID/EX
// register and hears from EX whether a branch is taken; it produces the PC and
// IF/ID controls for the fetch stage. On a load-use stall the control lines
// clocked into ID/EX are zeros (a bubble). The register bank's write port is
// driven by the write-back stage; a debug port reads any register.
// The parts of the stage and the bubble on a stall follow the reference
// description; the debug port and the contents of ID/EX are this design's.
//
// Interface: clk, rst_n; ifid (ifid_t); branch_taken; rf_we, rf_waddr[4:0],
//   rf_wdata[31:0]; dbg_addr[4:0] -> dbg_data[31:0];
//   -> idex (idex_t, registered), pc_write, pc_src, ifid_write, ifid_flush,
//   stall (a bubble is being inserted this cycle).
module id_stage
  import mips_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  ifid_t       ifid,
  input  logic        branch_taken,
  input  logic        rf_we,
  input  logic [4:0]  rf_waddr,
  input  logic [31:0] rf_wdata,
  input  logic [4:0]  dbg_addr,
  output logic [31:0] dbg_data,
  output idex_t       idex,
  output logic        pc_write,
  output logic        pc_src,
  output logic        ifid_write,
  output logic        ifid_flush,
  output logic        stall
);
  logic [5:0]  opcode, funct;
  logic [4:0]  rs, rt, rd, shamt;
  logic [15:0] imm16;
  logic [31:0] rs_val, rt_val, imm, imm_sh;
  ctrl_t       ctrl;
  logic        sign_ext;

  always_comb begin
    opcode = ifid.instr[31:26];
    rs     = ifid.instr[25:21];
    rt     = ifid.instr[20:16];
    rd     = ifid.instr[15:11];
    shamt  = ifid.instr[10:6];
    funct  = ifid.instr[5:0];
    imm16  = ifid.instr[15:0];
  end

  control_unit u_ctrl (.opcode, .funct, .ctrl, .sign_ext);

  sign_extender u_sext (.imm(imm16), .sign_ext, .ext(imm), .ext_sh2(imm_sh));

  register_bank u_regs (
    .clk, .rst_n,
    .we(rf_we), .waddr(rf_waddr), .wdata(rf_wdata),
    .raddr1(rs), .rdata1(rs_val),
    .raddr2(rt), .rdata2(rt_val),
    .dbg_addr, .dbg_data
  );

  hazard_unit u_haz (
    .ifid_rs(rs), .ifid_rt(rt),
    .idex_rt(idex.rt), .idex_mem_read(idex.ctrl.mem.mem_read),
    .branch_taken,
    .pc_write, .pc_src, .ifid_write, .ifid_flush, .bubble(stall)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      idex <= '0;
    end else begin
      // A branch deciding in EX is never a load, so a redirect and a
      // load-use stall are never requested in the same cycle.
      assert (!(branch_taken && idex.ctrl.mem.mem_read))
        else $error("branch decision and load in EX at the same time");
      idex.ctrl   <= stall ? '0 : ctrl;
      idex.pc4    <= ifid.pc4;
      idex.rs_val <= rs_val;
      idex.rt_val <= rt_val;
      idex.imm    <= imm;
      idex.imm_sh <= imm_sh;
      idex.jidx   <= ifid.instr[25:0];
      idex.rs     <= rs;
      idex.rt     <= rt;
      idex.rd     <= rd;
      idex.shamt  <= shamt;
    end
  end
endmodule
