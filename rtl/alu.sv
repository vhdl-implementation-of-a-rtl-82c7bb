// alu: the arithmetic logic unit of the execute stage, with the HI/LO pair.
//
// Combinational part: result = f(op, a, b, shamt) for add, subtract, AND, OR,
// XOR, NOR, set-less-than (signed and unsigned), shifts by shamt, LUI (b
// moved to the upper half) and MFHI/MFLO (the HI or LO register). The flags
// zero (result == 0) and negative (result[31]) are given with it, as the
// processor description asks; the branch unit uses them.
// Sequential part: MULT and MULTU form the 64-bit product of a and b and write
// it into HI (upper word) and LO (lower word) at the end of the cycle, so an
// MFHI/MFLO in the very next instruction reads the new value. Signed and
// unsigned add/subtract give the same 32-bit result; overflow is not trapped.
// The single-cycle multiplier and the reset of HI/LO to zero are this
// design's choices.
//
// Interface: clk, rst_n; op (alu_op_e), a[31:0], b[31:0], shamt[4:0]
//            -> result[31:0], zero, negative.
module alu
  import mips_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  alu_op_e     op,
  input  logic [31:0] a,
  input  logic [31:0] b,
  input  logic [4:0]  shamt,
  output logic [31:0] result,
  output logic        zero,
  output logic        negative
);
  logic [31:0] hi, lo;
  logic [63:0] product;

  always_comb begin
    if (op == ALU_MULT) product = $signed({{32{a[31]}}, a}) * $signed({{32{b[31]}}, b});
    else                product = {32'd0, a} * {32'd0, b};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hi <= '0;
      lo <= '0;
    end else if (op == ALU_MULT || op == ALU_MULTU) begin
      hi <= product[63:32];
      lo <= product[31:0];
    end
  end

  always_comb begin
    unique case (op)
      ALU_ADD:   result = a + b;
      ALU_SUB:   result = a - b;
      ALU_AND:   result = a & b;
      ALU_OR:    result = a | b;
      ALU_XOR:   result = a ^ b;
      ALU_NOR:   result = ~(a | b);
      ALU_SLT:   result = {31'd0, $signed(a) < $signed(b)};
      ALU_SLTU:  result = {31'd0, a < b};
      ALU_SLL:   result = b << shamt;
      ALU_SRL:   result = b >> shamt;
      ALU_SRA:   result = $signed(b) >>> shamt;
      ALU_LUI:   result = {b[15:0], 16'd0};
      ALU_MULT,
      ALU_MULTU: result = '0;
      ALU_MFHI:  result = hi;
      ALU_MFLO:  result = lo;
      default:   result = '0;
    endcase
    zero     = (result == '0);
    negative = result[31];
  end
endmodule
