// tb_instr_mem: fills all 32 words through the write port, reads each back by
// byte address, then rewrites random words and checks a model copy. Also
// checks that a read in the cycle of a write to the same word returns the old
// word and the new one after the edge.
module tb_instr_mem;
  int checks = 0, failures = 0;
  logic clk = 0, we = 0;
  logic [31:0] wr_addr = 0, wr_data = 0, rd_addr = 0, instr;
  logic [31:0] model [32];
  instr_mem #(.WORDS(32)) dut (.clk, .we, .wr_addr, .wr_data, .rd_addr, .instr);
  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic write(input int w, input logic [31:0] d);
    @(negedge clk);
    we = 1; wr_addr = 32'(w * 4); wr_data = d;
    @(posedge clk); #1;
    we = 0;
    model[w] = d;
  endtask

  task automatic read_check(input int w);
    rd_addr = 32'(w * 4);
    #1;
    checks++;
    if (instr !== model[w]) begin
      failures++;
      $display("FAIL word %0d got %h exp %h", w, instr, model[w]);
    end
  endtask

  initial begin
    for (int w = 0; w < 32; w++) write(w, $urandom);
    for (int w = 0; w < 32; w++) read_check(w);
    repeat (200) begin
      write($urandom_range(0, 31), $urandom);
      read_check($urandom_range(0, 31));
    end
    // read during write: old value before the edge, new after
    @(negedge clk);
    rd_addr = 32'd8; we = 1; wr_addr = 32'd8; wr_data = ~model[2];
    #1; checks++;
    if (instr !== model[2]) begin failures++; $display("FAIL read-before-write"); end
    @(posedge clk); #1; we = 0; model[2] = ~model[2];
    read_check(2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
