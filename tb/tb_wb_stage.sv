// tb_wb_stage: random MEM/WB contents; checks the register write port takes the
// loaded data when mem_to_reg is set and the ALU result otherwise.
module tb_wb_stage;
  import mips_pkg::*;
  int checks = 0, failures = 0;
  memwb_t memwb;
  logic rf_we;
  logic [4:0] rf_waddr;
  logic [31:0] rf_wdata;
  wb_stage dut (.memwb, .rf_we, .rf_waddr, .rf_wdata);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (300) begin
      memwb.wb.reg_write  = 1'($urandom);
      memwb.wb.mem_to_reg = 1'($urandom);
      memwb.alu_result    = $urandom;
      memwb.mem_data      = $urandom;
      memwb.dest          = 5'($urandom);
      #1;
      checks++;
      if (rf_we !== memwb.wb.reg_write || rf_waddr !== memwb.dest ||
          rf_wdata !== (memwb.wb.mem_to_reg ? memwb.mem_data : memwb.alu_result)) begin
        failures++;
        $display("FAIL we=%b addr=%0d data=%h", rf_we, rf_waddr, rf_wdata);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
