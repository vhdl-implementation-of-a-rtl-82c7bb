// register_bank: the 32 x 32-bit MIPS general register file.
//
// Two read ports (rs, rt) for the decode stage, one write port driven by the
// write-back stage, and a third read port that lets a test bench watch any
// register. Register 0 always reads as zero and ignores writes. The document
// defines the bank as written in the first half of the cycle and read in the
// second half, so a value written in a cycle can be read in the same cycle;
// this RTL keeps one edge-triggered write at the rising edge and gets the
// same behaviour by bypassing the write data to a read port whose address
// matches the write address. The asynchronous clear of all registers on reset is this design's
// choice.
//
// Interface: clk, rst_n; we, waddr[4:0], wdata[31:0];
//            raddr1/raddr2/dbg_addr[4:0] -> rdata1/rdata2/dbg_data[31:0].
module register_bank (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        we,
  input  logic [4:0]  waddr,
  input  logic [31:0] wdata,
  input  logic [4:0]  raddr1,
  output logic [31:0] rdata1,
  input  logic [4:0]  raddr2,
  output logic [31:0] rdata2,
  input  logic [4:0]  dbg_addr,
  output logic [31:0] dbg_data
);
  logic [31:0] regs [32];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 32; i++) regs[i] <= '0;
    end else if (we && waddr != 5'd0) begin
      regs[waddr] <= wdata;
    end
  end

  function automatic logic [31:0] rd(input logic [4:0] a);
    if (a == 5'd0)                  return '0;
    else if (we && a == waddr)      return wdata;
    else                            return regs[a];
  endfunction

  always_comb begin
    rdata1   = rd(raddr1);
    rdata2   = rd(raddr2);
    dbg_data = rd(dbg_addr);
  end
endmodule
