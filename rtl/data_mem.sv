// data_mem: the small data memory of the memory stage.
//
// BYTES bytes (default 128, i.e. 1 kbit) held as 32-bit words, read and
// written within one cycle as the processor description assumes. Word
// accesses use the word at addr (addr[1:0] ignored); byte accesses use the
// byte addr[1:0] of that word, little-endian (byte 0 = bits 7:0). A loaded
// byte is sign-extended unless is_unsigned is high (LB vs LBU). Writes happen
// at the rising edge when we is high; the read is asynchronous and upper
// address bits are ignored. Size, byte order and address wrap are this
// design's choices; the word/byte access and optional sign extension follow
// the document.
//
// Interface: clk; we, re, is_byte, is_unsigned, addr[31:0], wdata[31:0]
//            -> rdata[31:0] (zero when re is low).
module data_mem #(
  parameter int unsigned BYTES = 128
) (
  input  logic        clk,
  input  logic        we,
  input  logic        re,
  input  logic        is_byte,
  input  logic        is_unsigned,
  input  logic [31:0] addr,
  input  logic [31:0] wdata,
  output logic [31:0] rdata
);
  localparam int unsigned WORDS = (BYTES >= 8) ? BYTES / 4 : 2;
  localparam int unsigned AW    = $clog2(WORDS);

  logic [31:0] mem [WORDS];
  logic [AW-1:0] idx;
  logic [1:0]    off;
  logic [31:0]   word;
  logic [7:0]    byte_v;

  always_comb begin
    idx    = addr[2 +: AW];
    off    = addr[1:0];
    word   = mem[idx];
    byte_v = word[8*off +: 8];
    if (!re)          rdata = '0;
    else if (is_byte) rdata = {{24{byte_v[7] & !is_unsigned}}, byte_v};
    else              rdata = word;
  end

  always_ff @(posedge clk) begin
    if (we) begin
      if (is_byte) mem[idx][8*off +: 8] <= wdata[7:0];
      else         mem[idx]             <= wdata;
    end
  end
endmodule
