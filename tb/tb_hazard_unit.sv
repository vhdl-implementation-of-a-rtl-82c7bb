// tb_hazard_unit: exhaustive over small register numbers plus random cases.
// The expected outputs are derived case by case: a load in EX whose rt
// (non-zero) matches the decoding instruction's rs or rt means stall (hold PC
// and IF/ID, bubble); a taken branch means redirect and flush.
module tb_hazard_unit;
  int checks = 0, failures = 0, stalls = 0, redirects = 0;
  logic [4:0] ifid_rs, ifid_rt, idex_rt;
  logic idex_mem_read, branch_taken;
  logic pc_write, pc_src, ifid_write, ifid_flush, bubble;
  hazard_unit dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    logic e_pcw, e_src, e_ifw, e_fl, e_bub;
    #1;
    if (branch_taken) begin
      e_pcw = 1; e_src = 1; e_ifw = 1; e_fl = 1; e_bub = 0; redirects++;
    end else if (idex_mem_read && idex_rt != 0 && (idex_rt == ifid_rs || idex_rt == ifid_rt)) begin
      e_pcw = 0; e_src = 0; e_ifw = 0; e_fl = 0; e_bub = 1; stalls++;
    end else begin
      e_pcw = 1; e_src = 0; e_ifw = 1; e_fl = 0; e_bub = 0;
    end
    checks++;
    if ({pc_write, pc_src, ifid_write, ifid_flush, bubble} !== {e_pcw, e_src, e_ifw, e_fl, e_bub}) begin
      failures++;
      $display("FAIL rs=%0d rt=%0d exrt=%0d mr=%b bt=%b -> %b%b%b%b%b", ifid_rs, ifid_rt,
               idex_rt, idex_mem_read, branch_taken, pc_write, pc_src, ifid_write, ifid_flush, bubble);
    end
  endtask

  initial begin
    for (int a = 0; a < 4; a++)
      for (int b = 0; b < 4; b++)
        for (int c = 0; c < 4; c++)
          for (int m = 0; m < 2; m++) begin
            ifid_rs = 5'(a); ifid_rt = 5'(b); idex_rt = 5'(c);
            idex_mem_read = 1'(m); branch_taken = 0;
            check();
          end
    repeat (500) begin
      ifid_rs = 5'($urandom); ifid_rt = 5'($urandom);
      idex_rt = ($urandom_range(0, 1) != 0) ? ifid_rs : 5'($urandom);
      idex_mem_read = 1'($urandom); branch_taken = ($urandom_range(0, 3) == 0);
      if (branch_taken) idex_mem_read = 0;  // a branch in EX is never a load
      check();
    end
    checks++;
    if (stalls == 0 || redirects == 0) begin failures++; $display("FAIL coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
