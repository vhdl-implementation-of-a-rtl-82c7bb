// tb_alu: random operands for every combinational operation, checked against
// reference arithmetic written with wider integers; then MULT and MULTU
// followed by MFHI/MFLO, checked against a 64-bit product computed from
// longint values.
module tb_alu;
  import mips_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  alu_op_e op = ALU_ADD;
  logic [31:0] a = 0, b = 0, result;
  logic [4:0] shamt = 0;
  logic zero, negative;
  alu dut (.*);
  always #5 clk = ~clk;

  initial begin
    #500000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] model(input alu_op_e o, input logic [31:0] x, input logic [31:0] y,
                                        input logic [4:0] s);
    longint sx, sy;
    sx = longint'(signed'(x)); sy = longint'(signed'(y));
    case (o)
      ALU_ADD:  return 32'(sx + sy);
      ALU_SUB:  return 32'(sx - sy);
      ALU_AND:  return x & y;
      ALU_OR:   return x | y;
      ALU_XOR:  return x ^ y;
      ALU_NOR:  return ~(x | y);
      ALU_SLT:  return (sx < sy) ? 1 : 0;
      ALU_SLTU: return ({32'd0, x} < {32'd0, y}) ? 1 : 0;
      ALU_SLL:  return 32'(longint'(y) * (longint'(1) << s));
      ALU_SRL:  return 32'(longint'(y) / (longint'(1) << s));
      ALU_SRA:  return 32'(sy >>> s);
      ALU_LUI:  return 32'(longint'(y[15:0]) * 65536);
      default:  return 0;
    endcase
  endfunction

  task automatic comb_check(input alu_op_e o, input logic [31:0] x, input logic [31:0] y,
                            input logic [4:0] s);
    logic [31:0] e;
    @(negedge clk);
    op = o; a = x; b = y; shamt = s;
    #1;
    e = model(o, x, y, s);
    checks++;
    if (result !== e || zero !== (e == 0) || negative !== e[31]) begin
      failures++;
      $display("FAIL %s a=%h b=%h s=%0d got %h z=%b n=%b exp %h", o.name(), x, y, s,
               result, zero, negative, e);
    end
  endtask

  task automatic mult_check(input logic is_signed, input logic [31:0] x, input logic [31:0] y);
    logic [63:0] p;
    if (is_signed) p = 64'(longint'(signed'(x)) * longint'(signed'(y)));
    else           p = 64'(longint'({32'd0, x}) * longint'({32'd0, y}));
    @(negedge clk);
    op = is_signed ? ALU_MULT : ALU_MULTU; a = x; b = y;
    @(negedge clk);
    op = ALU_MFHI; a = $urandom; b = $urandom;
    #1; checks++;
    if (result !== p[63:32]) begin failures++; $display("FAIL MFHI %h*%h got %h exp %h", x, y, result, p[63:32]); end
    op = ALU_MFLO;
    #1; checks++;
    if (result !== p[31:0]) begin failures++; $display("FAIL MFLO %h*%h got %h exp %h", x, y, result, p[31:0]); end
  endtask

  initial begin
    alu_op_e ops[12] = '{ALU_ADD, ALU_SUB, ALU_AND, ALU_OR, ALU_XOR, ALU_NOR, ALU_SLT,
                         ALU_SLTU, ALU_SLL, ALU_SRL, ALU_SRA, ALU_LUI};
    #12 rst_n = 1;
    // HI/LO are cleared by reset
    op = ALU_MFHI; #1; checks++;
    if (result !== 0 || zero !== 1) begin failures++; $display("FAIL HI after reset"); end
    comb_check(ALU_SUB, 32'h5, 32'h5, 0);
    comb_check(ALU_SUB, 32'h0, 32'h1, 0);
    comb_check(ALU_SLT, 32'h8000_0000, 32'h1, 0);
    comb_check(ALU_SLTU, 32'h8000_0000, 32'h1, 0);
    comb_check(ALU_SRA, 32'h0, 32'h8000_0000, 31);
    repeat (1000) comb_check(ops[$urandom_range(0, 11)], $urandom, $urandom, 5'($urandom));
    mult_check(1, 32'hFFFF_FFFF, 32'hFFFF_FFFF);
    mult_check(0, 32'hFFFF_FFFF, 32'hFFFF_FFFF);
    mult_check(1, 32'h8000_0000, 32'h7FFF_FFFF);
    repeat (100) mult_check(1'($urandom), $urandom, $urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
