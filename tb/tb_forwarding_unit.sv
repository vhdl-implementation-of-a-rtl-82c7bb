// tb_forwarding_unit: random register numbers biased to collide; expected
// selects computed separately for each operand (EX/MEM first, then MEM/WB,
// never for $0 or a non-writing instruction).
module tb_forwarding_unit;
  int checks = 0, failures = 0, n_ex = 0, n_wb = 0, n_both = 0;
  logic [4:0] idex_rs, idex_rt, exmem_dest, memwb_dest;
  logic exmem_reg_write, memwb_reg_write;
  logic [1:0] fwd_a, fwd_b;
  forwarding_unit dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [1:0] expect_sel(input logic [4:0] r);
    logic ex_hit, wb_hit;
    ex_hit = exmem_reg_write && (exmem_dest == r) && (r != 0);
    wb_hit = memwb_reg_write && (memwb_dest == r) && (r != 0);
    if (ex_hit && wb_hit) n_both++;
    if (ex_hit) begin n_ex++; return 2'b10; end
    if (wb_hit) begin n_wb++; return 2'b01; end
    return 2'b00;
  endfunction

  initial begin
    repeat (2000) begin
      idex_rs = 5'($urandom_range(0, 3)); idex_rt = 5'($urandom_range(0, 3));
      exmem_dest = 5'($urandom_range(0, 3)); memwb_dest = 5'($urandom_range(0, 3));
      exmem_reg_write = 1'($urandom); memwb_reg_write = 1'($urandom);
      #1;
      checks++;
      if (fwd_a !== expect_sel(idex_rs) || fwd_b !== expect_sel(idex_rt)) begin
        failures++;
        $display("FAIL rs=%0d rt=%0d ex=%0d/%b wb=%0d/%b a=%b b=%b", idex_rs, idex_rt,
                 exmem_dest, exmem_reg_write, memwb_dest, memwb_reg_write, fwd_a, fwd_b);
      end
    end
    checks++;
    if (n_ex == 0 || n_wb == 0 || n_both == 0) begin failures++; $display("FAIL coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
