// mem_stage: the memory access stage and the MEM/WB pipeline register.
//
// Uses the ALU result in EX/MEM as the data memory address: stores (SW, SB)
// write the store data at the rising edge, loads (LW, LB, LBU) read within the
// same cycle. The loaded data, the ALU result, the destination register and
// the write-back control lines are clocked into MEM/WB for the write-back
// stage; the register number and write-back value are also what the
// forwarding unit sees. Reset clears MEM/WB. The single-cycle access follows
// the reference description; the reset is this design's choice.
//
// Interface: clk, rst_n; exmem (exmem_t) -> memwb (memwb_t, registered).
module mem_stage
  import mips_pkg::*;
#(
  parameter int unsigned DMEM_BYTES = 128
) (
  input  logic   clk,
  input  logic   rst_n,
  input  exmem_t exmem,
  output memwb_t memwb
);
  logic [31:0] rdata;

  data_mem #(.BYTES(DMEM_BYTES)) u_dmem (
    .clk,
    .we(exmem.mem.mem_write), .re(exmem.mem.mem_read),
    .is_byte(exmem.mem.mem_byte), .is_unsigned(exmem.mem.mem_unsigned),
    .addr(exmem.alu_result), .wdata(exmem.store_data), .rdata
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      memwb <= '0;
    end else begin
      memwb.wb         <= exmem.wb;
      memwb.alu_result <= exmem.alu_result;
      memwb.mem_data   <= rdata;
      memwb.dest       <= exmem.dest;
    end
  end
endmodule
