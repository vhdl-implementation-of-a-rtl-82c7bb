// tb_branch_unit: all branch types against all flag combinations, compared with
// the branch rules written out per type.
module tb_branch_unit;
  import mips_pkg::*;
  int checks = 0, failures = 0;
  branch_e branch;
  logic zero, negative, taken;
  branch_unit dut (.branch, .zero, .negative, .taken);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    branch_e types[6] = '{BR_NONE, BR_EQ, BR_NE, BR_LEZ, BR_GTZ, BR_J};
    foreach (types[i])
      for (int f = 0; f < 4; f++) begin
        logic exp_t;
        branch = types[i]; zero = f[0]; negative = f[1];
        // zero and negative together cannot come from a real ALU result,
        // but the unit must still be defined for them
        case (types[i])
          BR_EQ:   exp_t = (f[0] == 1);
          BR_NE:   exp_t = (f[0] == 0);
          BR_LEZ:  exp_t = (f != 0);
          BR_GTZ:  exp_t = (f == 0);
          BR_J:    exp_t = 1;
          default: exp_t = 0;
        endcase
        #1;
        checks++;
        if (taken !== exp_t) begin
          failures++;
          $display("FAIL %s z=%b n=%b taken=%b", types[i].name(), zero, negative, taken);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
