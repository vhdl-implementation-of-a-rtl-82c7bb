// hazard_unit: hazard detection unit of the decode stage.
//
// Two cases, as described for the processor:
//  * Load-use: the instruction in EX (ID/EX) is a load whose target rt is
//    named as rs or rt by the instruction in decode (IF/ID). The loaded value
//    is not ready for forwarding in time, so one stall cycle is inserted: the
//    PC and the IF/ID register hold (pc_write = ifid_write = 0) and the
//    control lines entering ID/EX are replaced by zeros (bubble = 1).
//  * Taken branch or jump, reported by the branch unit in EX: the PC is
//    written with the branch target (pc_src = 1) and the instruction just
//    fetched is replaced by a no-op in IF/ID (ifid_flush = 1). The instruction
//    right after the branch, already in decode, completes (the MIPS branch
//    delay slot), so a taken branch costs one stall cycle.
// Comparing rs/rt regardless of whether the decoded instruction reads them
// (as the hazard diagram does) can add a harmless extra stall. Keeping the
// delay slot instead of flushing it is this design's choice.
//
// Interface (combinational): ifid_rs, ifid_rt, idex_rt[4:0], idex_mem_read,
//   branch_taken -> pc_write, pc_src, ifid_write, ifid_flush, bubble.
module hazard_unit (
  input  logic [4:0] ifid_rs,
  input  logic [4:0] ifid_rt,
  input  logic [4:0] idex_rt,
  input  logic       idex_mem_read,
  input  logic       branch_taken,
  output logic       pc_write,
  output logic       pc_src,
  output logic       ifid_write,
  output logic       ifid_flush,
  output logic       bubble
);
  logic load_use;

  always_comb begin
    load_use = idex_mem_read && idex_rt != 5'd0 &&
               (idex_rt == ifid_rs || idex_rt == ifid_rt);
    pc_src     = branch_taken;
    ifid_flush = branch_taken;
    // A branch in EX is never a load, so the two cases cannot meet; the
    // branch still takes priority for safety.
    pc_write   = branch_taken || !load_use;
    ifid_write = branch_taken || !load_use;
    bubble     = !branch_taken && load_use;
  end
endmodule
