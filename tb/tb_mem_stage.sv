// tb_mem_stage: drives EX/MEM contents for word and byte stores and loads and
// checks what MEM/WB holds one edge later (loaded data, ALU result, destination
// and write-back controls), with a byte-array model of the memory.
module tb_mem_stage;
  import mips_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  exmem_t exmem = '0;
  memwb_t memwb;
  logic [7:0] model [128];
  int n_kind [5] = '{0, 0, 0, 0, 0};

  mem_stage #(.DMEM_BYTES(128)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #500000;
    failures++;
    $display("watchdog expired");
    checks++;
    if (n_kind[1] == 0 || n_kind[3] == 0 || n_kind[4] == 0) begin failures++; $display("FAIL coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #12 rst_n = 1;
    for (int w = 0; w < 32; w++) begin
      logic [31:0] d;
      d = $urandom;
      @(negedge clk);
      exmem = '0; exmem.mem.mem_write = 1; exmem.alu_result = 32'(w * 4); exmem.store_data = d;
      for (int i = 0; i < 4; i++) model[w * 4 + i] = d[8*i +: 8];
    end
    repeat (600) begin
      int a, kind;
      logic [31:0] d, e;
      logic [4:0] dst;
      a = $urandom_range(0, 127);
      kind = $urandom_range(0, 4);
      d = $urandom;
      dst = 5'($urandom);
      e = '0;
      @(negedge clk);
      exmem = '0; exmem.alu_result = 32'(a); exmem.dest = dst;
      n_kind[kind]++;
      case (kind)
        0: begin exmem.mem.mem_write = 1; exmem.store_data = d; a = a & ~3;
                 for (int i = 0; i < 4; i++) model[a + i] = d[8*i +: 8]; end
        1: begin exmem.mem.mem_write = 1; exmem.mem.mem_byte = 1; exmem.store_data = d;
                 model[a] = d[7:0]; end
        default: begin
          exmem.mem.mem_read = 1; exmem.wb.reg_write = 1; exmem.wb.mem_to_reg = 1;
          exmem.mem.mem_byte = (kind != 2); exmem.mem.mem_unsigned = (kind == 4);
          if (kind == 2) e = {model[(a & ~3) + 3], model[(a & ~3) + 2], model[(a & ~3) + 1], model[a & ~3]};
          else if (kind == 3) e = {{24{model[a][7]}}, model[a]};
          else e = {24'd0, model[a]};
        end
      endcase
      @(posedge clk); #1;
      if (kind >= 2) begin
        checks++;
        if (memwb.mem_data !== e || memwb.dest !== dst || !memwb.wb.reg_write ||
            !memwb.wb.mem_to_reg || memwb.alu_result !== 32'(a)) begin
          failures++;
          $display("FAIL load kind=%0d a=%0d got %h exp %h", kind, a, memwb.mem_data, e);
        end
      end
    end
    checks++;
    if (n_kind[1] == 0 || n_kind[3] == 0 || n_kind[4] == 0) begin failures++; $display("FAIL coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
