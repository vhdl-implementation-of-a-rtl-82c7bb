// pc_adder: the instruction-address adder of the fetch stage.
//
// Purely combinational: sum = addr + 4, the address of the next sequential
// instruction. Whether the sum is loaded into the program counter is decided
// by the hazard logic in decode, not here.
//
// Interface: addr[31:0] -> sum[31:0], no clock.
module pc_adder (
  input  logic [31:0] addr,
  output logic [31:0] sum
);
  always_comb sum = addr + 32'd4;
endmodule
