// tb_program_counter: resets the PC, then drives random next_pc values with a
// random update line and checks the register loads only when update is high.
module tb_program_counter;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, update = 0;
  logic [31:0] next_pc = 0, pc, model;
  program_counter dut (.clk, .rst_n, .update, .next_pc, .pc);
  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #12;
    checks++;
    if (pc !== 32'h0) begin failures++; $display("FAIL reset pc=%h", pc); end
    rst_n = 1;
    model = 0;
    repeat (300) begin
      @(negedge clk);
      update  = $urandom_range(0, 1);
      next_pc = $urandom;
      @(posedge clk);
      if (update) model = next_pc;
      #1;
      checks++;
      if (pc !== model) begin failures++; $display("FAIL pc=%h exp=%h", pc, model); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
