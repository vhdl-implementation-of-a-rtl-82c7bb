// branch_unit: the "determine branch" unit of the execute stage.
//
// Looks at the branch type of the instruction in EX and at the flags of the
// ALU, which computes rs - rt for every conditional branch (rt is $0 for BLEZ
// and BGTZ, so the ALU result is rs itself), and says whether the branch is
// taken:  BEQ: zero;  BNE: !zero;  BLEZ: zero | negative;
// BGTZ: !zero & !negative;  J: always. The decision goes back to the hazard
// unit in decode. The use of the zero flag for BEQ follows the processor
// description; the other branch types are this design's choice.
//
// Interface: branch (branch_e), zero, negative -> taken. Combinational.
module branch_unit
  import mips_pkg::*;
(
  input  branch_e branch,
  input  logic    zero,
  input  logic    negative,
  output logic    taken
);
  always_comb begin
    unique case (branch)
      BR_EQ:   taken = zero;
      BR_NE:   taken = !zero;
      BR_LEZ:  taken = zero || negative;
      BR_GTZ:  taken = !zero && !negative;
      BR_J:    taken = 1'b1;
      default: taken = 1'b0;
    endcase
  end
endmodule
