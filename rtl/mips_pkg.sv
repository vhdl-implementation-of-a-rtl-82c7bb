// mips_pkg: types and constants shared by the five-stage MIPS-32 pipeline.
//
// Holds the instruction-field opcodes and function codes of the supported
// MIPS-32 subset, the ALU operation and branch-type encodings, the bundle of
// control lines the decoder produces (grouped as the EX, MEM and WB lines that
// travel down the pipeline) and the contents of the four pipeline registers
// IF/ID, ID/EX, EX/MEM and MEM/WB. The opcode and function numbers are the
// standard MIPS-32 ones; the internal encodings (alu_op_e, branch_e) are this
// design's own choice.
package mips_pkg;

  // ---- MIPS-32 primary opcodes (instr[31:26]) ----
  localparam logic [5:0] OP_RTYPE = 6'h00;
  localparam logic [5:0] OP_J     = 6'h02;
  localparam logic [5:0] OP_BEQ   = 6'h04;
  localparam logic [5:0] OP_BNE   = 6'h05;
  localparam logic [5:0] OP_BLEZ  = 6'h06;
  localparam logic [5:0] OP_BGTZ  = 6'h07;
  localparam logic [5:0] OP_ADDI  = 6'h08;
  localparam logic [5:0] OP_ADDIU = 6'h09;
  localparam logic [5:0] OP_SLTI  = 6'h0A;
  localparam logic [5:0] OP_SLTIU = 6'h0B;
  localparam logic [5:0] OP_ANDI  = 6'h0C;
  localparam logic [5:0] OP_ORI   = 6'h0D;
  localparam logic [5:0] OP_XORI  = 6'h0E;
  localparam logic [5:0] OP_LUI   = 6'h0F;
  localparam logic [5:0] OP_LB    = 6'h20;
  localparam logic [5:0] OP_LW    = 6'h23;
  localparam logic [5:0] OP_LBU   = 6'h24;
  localparam logic [5:0] OP_SB    = 6'h28;
  localparam logic [5:0] OP_SW    = 6'h2B;

  // ---- R-type function codes (instr[5:0]) ----
  localparam logic [5:0] FN_SLL   = 6'h00;
  localparam logic [5:0] FN_SRL   = 6'h02;
  localparam logic [5:0] FN_SRA   = 6'h03;
  localparam logic [5:0] FN_MFHI  = 6'h10;
  localparam logic [5:0] FN_MFLO  = 6'h12;
  localparam logic [5:0] FN_MULT  = 6'h18;
  localparam logic [5:0] FN_MULTU = 6'h19;
  localparam logic [5:0] FN_ADD   = 6'h20;
  localparam logic [5:0] FN_ADDU  = 6'h21;
  localparam logic [5:0] FN_SUB   = 6'h22;
  localparam logic [5:0] FN_SUBU  = 6'h23;
  localparam logic [5:0] FN_AND   = 6'h24;
  localparam logic [5:0] FN_OR    = 6'h25;
  localparam logic [5:0] FN_XOR   = 6'h26;
  localparam logic [5:0] FN_NOR   = 6'h27;
  localparam logic [5:0] FN_SLT   = 6'h2A;
  localparam logic [5:0] FN_SLTU  = 6'h2B;

  // ---- ALU operations ----
  typedef enum logic [3:0] {
    ALU_ADD   = 4'd0,
    ALU_SUB   = 4'd1,
    ALU_AND   = 4'd2,
    ALU_OR    = 4'd3,
    ALU_XOR   = 4'd4,
    ALU_NOR   = 4'd5,
    ALU_SLT   = 4'd6,
    ALU_SLTU  = 4'd7,
    ALU_SLL   = 4'd8,
    ALU_SRL   = 4'd9,
    ALU_SRA   = 4'd10,
    ALU_LUI   = 4'd11,
    ALU_MULT  = 4'd12,
    ALU_MULTU = 4'd13,
    ALU_MFHI  = 4'd14,
    ALU_MFLO  = 4'd15
  } alu_op_e;

  // ---- branch / jump type, judged in EX by the branch unit ----
  typedef enum logic [2:0] {
    BR_NONE = 3'd0,
    BR_EQ   = 3'd1,
    BR_NE   = 3'd2,
    BR_LEZ  = 3'd3,
    BR_GTZ  = 3'd4,
    BR_J    = 3'd5
  } branch_e;

  // Control lines used in EX.
  typedef struct packed {
    alu_op_e alu_op;
    logic    alu_src;    // 1: operand B is the extended immediate
    logic    reg_dst;    // 1: destination is rd (R-type), 0: rt
    branch_e branch;
  } ex_ctrl_t;

  // Control lines used in MEM.
  typedef struct packed {
    logic mem_read;
    logic mem_write;
    logic mem_byte;      // 1: byte access, 0: word access
    logic mem_unsigned;  // 1: zero-extend a loaded byte (LBU)
  } mem_ctrl_t;

  // Control lines used in WB.
  typedef struct packed {
    logic reg_write;
    logic mem_to_reg;    // 1: write back memory data, 0: ALU result
  } wb_ctrl_t;

  typedef struct packed {
    ex_ctrl_t  ex;
    mem_ctrl_t mem;
    wb_ctrl_t  wb;
  } ctrl_t;

  // IF/ID pipeline register.
  typedef struct packed {
    logic [31:0] instr;
    logic [31:0] pc4;      // address of the instruction + 4
  } ifid_t;

  // ID/EX pipeline register.
  typedef struct packed {
    ctrl_t       ctrl;
    logic [31:0] pc4;
    logic [31:0] rs_val;
    logic [31:0] rt_val;
    logic [31:0] imm;      // extended immediate
    logic [31:0] imm_sh;   // extended immediate shifted left by 2
    logic [25:0] jidx;     // jump instruction index
    logic [4:0]  rs;
    logic [4:0]  rt;
    logic [4:0]  rd;
    logic [4:0]  shamt;
  } idex_t;

  // EX/MEM pipeline register.
  typedef struct packed {
    mem_ctrl_t   mem;
    wb_ctrl_t    wb;
    logic [31:0] alu_result;
    logic [31:0] store_data;
    logic [4:0]  dest;
  } exmem_t;

  // MEM/WB pipeline register.
  typedef struct packed {
    wb_ctrl_t    wb;
    logic [31:0] alu_result;
    logic [31:0] mem_data;
    logic [4:0]  dest;
  } memwb_t;

  localparam logic [31:0] NOP = 32'h0000_0000;  // sll $0,$0,0

endpackage
