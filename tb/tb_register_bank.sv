// tb_register_bank: random writes and reads against an array model. Checks that
// all registers read zero after reset, that $0 stays zero, and that a read of
// the register being written in the same cycle returns the new value (the
// write-first-half, read-second-half behaviour).
module tb_register_bank;
  int checks = 0, failures = 0, bypass_seen = 0;
  logic clk = 0, rst_n = 0, we = 0;
  logic [4:0] waddr = 0, raddr1 = 0, raddr2 = 0, dbg_addr = 0;
  logic [31:0] wdata = 0, rdata1, rdata2, dbg_data;
  logic [31:0] model [32];
  register_bank dut (.*);
  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] expect_rd(input logic [4:0] a);
    if (a == 0) return 0;
    if (we && waddr == a) return wdata;
    return model[a];
  endfunction

  initial begin
    for (int i = 0; i < 32; i++) model[i] = 0;
    #22 rst_n = 1;
    for (int i = 0; i < 32; i++) begin
      raddr1 = 5'(i); #1; checks++;
      if (rdata1 !== 0) begin failures++; $display("FAIL reset r%0d=%h", i, rdata1); end
    end
    repeat (600) begin
      @(negedge clk);
      we = 1'($urandom); waddr = 5'($urandom); wdata = $urandom;
      raddr1 = 5'($urandom); raddr2 = ($urandom_range(0, 3) == 0) ? waddr : 5'($urandom);
      dbg_addr = 5'($urandom);
      #1;
      checks++;
      if (rdata1 !== expect_rd(raddr1) || rdata2 !== expect_rd(raddr2) ||
          dbg_data !== expect_rd(dbg_addr)) begin
        failures++;
        $display("FAIL r1[%0d]=%h r2[%0d]=%h dbg[%0d]=%h", raddr1, rdata1, raddr2, rdata2,
                 dbg_addr, dbg_data);
      end
      if (we && waddr != 0 && raddr2 == waddr) bypass_seen++;
      @(posedge clk);
      if (we && waddr != 0) model[waddr] = wdata;
    end
    checks++;
    if (bypass_seen == 0) begin failures++; $display("FAIL bypass never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
