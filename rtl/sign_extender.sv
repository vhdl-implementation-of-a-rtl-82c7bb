// sign_extender: immediate extension unit of the decode stage.
//
// Takes the 16-bit immediate field and extends it to 32 bits: by copying bit
// 15 when sign_ext is high (signed operations, loads, stores, branches) or
// with zeros when it is low (ANDI, ORI, XORI). A second output gives the
// extended value shifted left by two, the word offset of a branch. Both
// functions are as described for the processor; the choice of which
// instructions zero-extend follows the MIPS-32 architecture.
//
// Interface: imm[15:0], sign_ext -> ext[31:0], ext_sh2[31:0]. Combinational.
module sign_extender (
  input  logic [15:0] imm,
  input  logic        sign_ext,
  output logic [31:0] ext,
  output logic [31:0] ext_sh2
);
  always_comb begin
    ext     = {{16{sign_ext & imm[15]}}, imm};
    ext_sh2 = {ext[29:0], 2'b00};
  end
endmodule
