// forwarding_unit: operand forwarding for the ALU in the execute stage.
//
// For each ALU operand (rs, rt of the instruction in EX) it picks one of three
// sources: the value read from the register bank in decode (FWD_REG), the ALU
// result held in EX/MEM by the previous instruction (FWD_EXMEM), or the
// write-back value held in MEM/WB by the instruction before that (FWD_MEMWB,
// ALU result or loaded data). A source qualifies when that instruction writes
// a register, its destination is not $0 and equals the operand's register; the
// newer EX/MEM value wins over MEM/WB. The forwarded rt also serves as store
// data. The selection rules are those of the forwarding diagram; the 2-bit
// encoding is this design's.
//
// Interface (combinational): idex_rs, idex_rt, exmem_dest, memwb_dest[4:0],
//   exmem_reg_write, memwb_reg_write -> fwd_a, fwd_b (2 bits each).
module forwarding_unit (
  input  logic [4:0] idex_rs,
  input  logic [4:0] idex_rt,
  input  logic [4:0] exmem_dest,
  input  logic       exmem_reg_write,
  input  logic [4:0] memwb_dest,
  input  logic       memwb_reg_write,
  output logic [1:0] fwd_a,
  output logic [1:0] fwd_b
);
  localparam logic [1:0] FWD_REG   = 2'b00;
  localparam logic [1:0] FWD_MEMWB = 2'b01;
  localparam logic [1:0] FWD_EXMEM = 2'b10;

  function automatic logic [1:0] pick(input logic [4:0] r);
    if (exmem_reg_write && exmem_dest != 5'd0 && exmem_dest == r) return FWD_EXMEM;
    if (memwb_reg_write && memwb_dest != 5'd0 && memwb_dest == r) return FWD_MEMWB;
    return FWD_REG;
  endfunction

  always_comb begin
    fwd_a = pick(idex_rs);
    fwd_b = pick(idex_rt);
  end
endmodule
