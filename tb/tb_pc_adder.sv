// tb_pc_adder: checks pc_adder against addr + 4 for edge and random addresses,
// including the wrap at 2^32.
module tb_pc_adder;
  int checks = 0, failures = 0;
  logic [31:0] addr, sum;
  pc_adder dut (.addr, .sum);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [31:0] a);
    logic [32:0] ref_sum;
    addr = a;
    #1;
    ref_sum = {1'b0, a} + 33'd4;
    checks++;
    if (sum !== ref_sum[31:0]) begin
      failures++;
      $display("FAIL addr=%h sum=%h exp=%h", a, sum, ref_sum[31:0]);
    end
  endtask

  initial begin
    check(32'h0); check(32'h4); check(32'hFFFF_FFFC); check(32'h7FFF_FFFE);
    repeat (200) check($urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
