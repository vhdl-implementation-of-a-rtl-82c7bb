// wb_stage: the write-back stage.
//
// From the MEM/WB register it takes the two control lines (reg_write and
// mem_to_reg), the ALU result, the loaded data and the destination register,
// and drives the register bank's write port: the data is the loaded word when
// mem_to_reg is high and the ALU result otherwise. The same value is what the
// forwarding unit sees as the MEM/WB source. Combinational, as described.
//
// Interface: memwb (memwb_t) -> rf_we, rf_waddr[4:0], rf_wdata[31:0].
module wb_stage
  import mips_pkg::*;
(
  input  memwb_t      memwb,
  output logic        rf_we,
  output logic [4:0]  rf_waddr,
  output logic [31:0] rf_wdata
);
  always_comb begin
    rf_we    = memwb.wb.reg_write;
    rf_waddr = memwb.dest;
    rf_wdata = memwb.wb.mem_to_reg ? memwb.mem_data : memwb.alu_result;
  end
endmodule
