// tb_mips_cpu_random: random-program test of the whole core against an
// instruction-level reference model.
//
// Each round generates a 28-instruction program, followed by a halt loop
// (j 28). The instructions are drawn from the whole supported set: ALU
// operations, multiply with HI/LO moves, word and byte loads and stores, and
// forward conditional branches. They use only registers $1..$6, so
// back-to-back dependences, load-use cases and forwarding happen all the
// time.
//
// Each round then:
// - seeds the data memory with random words,
// - loads the program and releases reset,
// - runs long enough for the core to reach the halt loop,
// - compares all 32 registers and all data memory words with the model.
//
// The model executes one instruction at a time and follows the MIPS
// branch-delay-slot rule.
module tb_mips_cpu_random;
  import mips_pkg::*;
  localparam int ROUNDS = 300;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic imem_we = 0;
  logic [31:0] imem_addr = 0, imem_wdata = 0, dbg_reg_data, pc;
  logic [4:0] dbg_reg_addr = 0;
  logic stall, branch_taken;
  logic [1:0] fwd_a, fwd_b;

  mips_cpu dut (.*);
  always #5 clk = ~clk;

  initial begin
    #(ROUNDS * 2000 + 10000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_stall = 0, n_taken = 0, n_fwd_ex = 0, n_fwd_wb = 0;
  always @(posedge clk) if (rst_n) begin
    if (stall) n_stall++;
    if (branch_taken) n_taken++;
    if (fwd_a == 2'b10 || fwd_b == 2'b10) n_fwd_ex++;
    if (fwd_a == 2'b01 || fwd_b == 2'b01) n_fwd_wb++;
  end

  logic [31:0] prog [32];
  logic [31:0] m_reg [32];
  logic [31:0] m_mem [32];
  logic [31:0] m_hi, m_lo;

  function automatic int rr();  // a register from $0..$6, mostly $1..$6
    return ($urandom_range(0, 9) == 0) ? 0 : $urandom_range(1, 6);
  endfunction

  function automatic logic [31:0] gen(input int w, input bit no_branch);
    int k = $urandom_range(0, 30);
    int rs = rr(), rt = rr(), rd = rr();
    logic [15:0] imm = 16'($urandom);
    if (k == 30 && (no_branch || w > 25)) k = 0;
    case (k)
      0:  return {6'h00, 5'(rs), 5'(rt), 5'(rd), 5'd0, FN_ADD};
      1:  return {6'h00, 5'(rs), 5'(rt), 5'(rd), 5'd0, FN_ADDU};
      2:  return {6'h00, 5'(rs), 5'(rt), 5'(rd), 5'd0, FN_SUB};
      3:  return {6'h00, 5'(rs), 5'(rt), 5'(rd), 5'd0, FN_SUBU};
      4:  return {6'h00, 5'(rs), 5'(rt), 5'(rd), 5'd0, FN_AND};
      5:  return {6'h00, 5'(rs), 5'(rt), 5'(rd), 5'd0, FN_OR};
      6:  return {6'h00, 5'(rs), 5'(rt), 5'(rd), 5'd0, FN_XOR};
      7:  return {6'h00, 5'(rs), 5'(rt), 5'(rd), 5'd0, FN_NOR};
      8:  return {6'h00, 5'(rs), 5'(rt), 5'(rd), 5'd0, FN_SLT};
      9:  return {6'h00, 5'(rs), 5'(rt), 5'(rd), 5'd0, FN_SLTU};
      10: return {6'h00, 5'd0, 5'(rt), 5'(rd), 5'($urandom), FN_SLL};
      11: return {6'h00, 5'd0, 5'(rt), 5'(rd), 5'($urandom), FN_SRL};
      12: return {6'h00, 5'd0, 5'(rt), 5'(rd), 5'($urandom), FN_SRA};
      13: return {6'h00, 5'(rs), 5'(rt), 5'd0, 5'd0, FN_MULT};
      14: return {6'h00, 5'(rs), 5'(rt), 5'd0, 5'd0, FN_MULTU};
      15: return {6'h00, 5'd0, 5'd0, 5'(rd), 5'd0, FN_MFHI};
      16: return {6'h00, 5'd0, 5'd0, 5'(rd), 5'd0, FN_MFLO};
      17: return {OP_ADDI,  5'(rs), 5'(rt), imm};
      18: return {OP_ADDIU, 5'(rs), 5'(rt), imm};
      19: return {OP_SLTI,  5'(rs), 5'(rt), imm};
      20: return {OP_SLTIU, 5'(rs), 5'(rt), imm};
      21: return {OP_ANDI,  5'(rs), 5'(rt), imm};
      22: return {OP_ORI,   5'(rs), 5'(rt), imm};
      23: return {OP_XORI,  5'(rs), 5'(rt), imm};
      24: return {OP_LUI,   5'd0,   5'(rt), imm};
      25: return {OP_LW,  5'd0, 5'(rt), 16'($urandom_range(0, 31) * 4)};
      26: return {OP_SW,  5'd0, 5'(rt), 16'($urandom_range(0, 31) * 4)};
      27: return {OP_LB,  5'd0, 5'(rt), 16'($urandom_range(0, 127))};
      28: return {OP_LBU, 5'd0, 5'(rt), 16'($urandom_range(0, 127))};
      29: return {OP_SB,  5'd0, 5'(rt), 16'($urandom_range(0, 127))};
      default: begin
        // forward branch; target word w + 1 + off stays at or below 28
        int off = $urandom_range(1, 27 - w);
        logic [5:0] op;
        case ($urandom_range(0, 3))
          0: op = OP_BEQ;
          1: op = OP_BNE;
          2: begin op = OP_BLEZ; rt = 0; end
          default: begin op = OP_BGTZ; rt = 0; end
        endcase
        return {op, 5'(rs), 5'(rt), 16'(off)};
      end
    endcase
  endfunction

  // reference interpreter: runs from word 0 until the PC reaches word 28
  task automatic model_run();
    int p = 0, next = 1, steps = 0;
    int delayed_target = -1;
    while (p != 28 && steps < 200) begin
      logic [31:0] ins = prog[p];
      logic [5:0] op = ins[31:26], fn = ins[5:0];
      int rs = ins[25:21], rt = ins[20:16], rd = ins[15:11], sh = ins[10:6];
      logic [31:0] a = m_reg[rs], b = m_reg[rt];
      logic [31:0] se = {{16{ins[15]}}, ins[15:0]}, ze = {16'd0, ins[15:0]};
      logic signed [63:0] sp;
      logic [63:0] up;
      int addr;
      int target = -1;
      steps++;
      case (op)
        OP_RTYPE: case (fn)
          FN_ADD, FN_ADDU: m_reg[rd] = a + b;
          FN_SUB, FN_SUBU: m_reg[rd] = a - b;
          FN_AND:  m_reg[rd] = a & b;
          FN_OR:   m_reg[rd] = a | b;
          FN_XOR:  m_reg[rd] = a ^ b;
          FN_NOR:  m_reg[rd] = ~(a | b);
          FN_SLT:  m_reg[rd] = (signed'(a) < signed'(b)) ? 1 : 0;
          FN_SLTU: m_reg[rd] = (a < b) ? 1 : 0;
          FN_SLL:  m_reg[rd] = b << sh;
          FN_SRL:  m_reg[rd] = b >> sh;
          FN_SRA:  m_reg[rd] = signed'(b) >>> sh;
          FN_MULT: begin
            sp = longint'(signed'(a)) * longint'(signed'(b));
            m_hi = sp[63:32]; m_lo = sp[31:0];
          end
          FN_MULTU: begin
            up = {32'd0, a} * {32'd0, b};
            m_hi = up[63:32]; m_lo = up[31:0];
          end
          FN_MFHI: m_reg[rd] = m_hi;
          FN_MFLO: m_reg[rd] = m_lo;
          default: ;
        endcase
        OP_ADDI, OP_ADDIU: m_reg[rt] = a + se;
        OP_SLTI:  m_reg[rt] = (signed'(a) < signed'(se)) ? 1 : 0;
        OP_SLTIU: m_reg[rt] = (a < se) ? 1 : 0;
        OP_ANDI:  m_reg[rt] = a & ze;
        OP_ORI:   m_reg[rt] = a | ze;
        OP_XORI:  m_reg[rt] = a ^ ze;
        OP_LUI:   m_reg[rt] = {ins[15:0], 16'd0};
        OP_LW:  begin addr = int'(se) & 127; m_reg[rt] = m_mem[addr / 4]; end
        OP_LB:  begin
          addr = int'(se) & 127;
          m_reg[rt] = {{24{m_mem[addr / 4][8 * (addr % 4) + 7]}}, m_mem[addr / 4][8 * (addr % 4) +: 8]};
        end
        OP_LBU: begin addr = int'(se) & 127; m_reg[rt] = {24'd0, m_mem[addr / 4][8 * (addr % 4) +: 8]}; end
        OP_SW:  begin addr = int'(se) & 127; m_mem[addr / 4] = b; end
        OP_SB:  begin addr = int'(se) & 127; m_mem[addr / 4][8 * (addr % 4) +: 8] = b[7:0]; end
        OP_BEQ:  if (a == b) target = p + 1 + int'(signed'(ins[15:0]));
        OP_BNE:  if (a != b) target = p + 1 + int'(signed'(ins[15:0]));
        OP_BLEZ: if (signed'(a) <= 0) target = p + 1 + int'(signed'(ins[15:0]));
        OP_BGTZ: if (signed'(a) > 0)  target = p + 1 + int'(signed'(ins[15:0]));
        default: ;
      endcase
      m_reg[0] = 0;
      // delay slot: the instruction after a branch runs, then the target
      if (delayed_target >= 0) begin
        p = delayed_target;
        delayed_target = -1;
      end else begin
        p = p + 1;
      end
      if (target >= 0) delayed_target = target;
    end
  endtask

  initial begin
    for (int round = 0; round < ROUNDS; round++) begin
      bit prev_branch = 0;
      rst_n = 0;
      for (int w = 0; w < 28; w++) begin
        prog[w] = gen(w, prev_branch);
        prev_branch = (prog[w][31:26] inside {OP_BEQ, OP_BNE, OP_BLEZ, OP_BGTZ});
      end
      prog[28] = {OP_J, 26'd28};
      for (int w = 29; w < 32; w++) prog[w] = NOP;
      for (int i = 0; i < 32; i++) begin
        m_mem[i] = $urandom;
        dut.u_mem.u_dmem.mem[i] = m_mem[i];
        m_reg[i] = 0;
      end
      m_hi = 0; m_lo = 0;
      for (int i = 0; i < 32; i++) begin
        @(negedge clk);
        imem_we = 1; imem_addr = 32'(i * 4); imem_wdata = prog[i];
      end
      @(negedge clk); imem_we = 0;
      rst_n = 1;
      model_run();
      // 28 instructions, at most one stall each, one bubble per branch, drain
      repeat (100) @(negedge clk);
      checks++;
      if (!(pc inside {32'd112, 32'd116, 32'd120})) begin
        failures++;
        $display("FAIL round %0d: not in the halt loop, pc=%h", round, pc);
      end
      for (int r = 0; r < 32; r++) begin
        dbg_reg_addr = 5'(r);
        #1;
        checks++;
        if (dbg_reg_data !== m_reg[r]) begin
          failures++;
          $display("FAIL round %0d: $%0d = %h, model %h", round, r, dbg_reg_data, m_reg[r]);
        end
      end
      for (int i = 0; i < 32; i++) begin
        checks++;
        if (dut.u_mem.u_dmem.mem[i] !== m_mem[i]) begin
          failures++;
          $display("FAIL round %0d: mem word %0d = %h, model %h", round, i,
                   dut.u_mem.u_dmem.mem[i], m_mem[i]);
        end
      end
      if (failures > 0) begin
        for (int w = 0; w < 29; w++) $display("  %0d: %h", w, prog[w]);
        break;
      end
    end
    $display("stalls %0d, taken branches %0d, EX/MEM forwards %0d, MEM/WB forwards %0d",
             n_stall, n_taken, n_fwd_ex, n_fwd_wb);
    checks++;
    if (n_stall == 0 || n_taken == 0 || n_fwd_ex == 0 || n_fwd_wb == 0) begin
      failures++;
      $display("FAIL a pipeline mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
