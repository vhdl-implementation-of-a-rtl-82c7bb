// instr_mem: small instruction memory of the fetch stage.
//
// WORDS 32-bit words (default 32, i.e. 1 kbit, as in the processor
// description), modelling a cache that answers within one cycle. The read is
// asynchronous: instr is the word at byte address rd_addr (word index
// rd_addr[2 +: log2(WORDS)], upper address bits ignored). A synchronous write
// port lets a host load the program before or while the CPU runs. Reads of a
// location written in the same cycle return the old word. Word indexing and
// the write port's shape are this design's choices.
//
// Interface: clk; we, wr_addr[31:0] (byte address), wr_data[31:0];
//            rd_addr[31:0] -> instr[31:0].
module instr_mem #(
  parameter int unsigned WORDS = 32
) (
  input  logic        clk,
  input  logic        we,
  input  logic [31:0] wr_addr,
  input  logic [31:0] wr_data,
  input  logic [31:0] rd_addr,
  output logic [31:0] instr
);
  localparam int unsigned AW = (WORDS > 1) ? $clog2(WORDS) : 1;

  logic [31:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (we) mem[wr_addr[2 +: AW]] <= wr_data;
  end

  always_comb instr = mem[rd_addr[2 +: AW]];
endmodule
