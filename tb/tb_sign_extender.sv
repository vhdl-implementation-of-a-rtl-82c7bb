// tb_sign_extender: checks sign and zero extension of the immediate and the
// shifted-by-two output, using integer arithmetic as the reference.
module tb_sign_extender;
  int checks = 0, failures = 0;
  logic [15:0] imm;
  logic sign_ext;
  logic [31:0] ext, ext_sh2;
  sign_extender dut (.imm, .sign_ext, .ext, .ext_sh2);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [15:0] i, input logic s);
    int signed v;
    logic [31:0] e;
    imm = i; sign_ext = s;
    #1;
    v = s ? int'(signed'(i)) : int'(i);  // integer value of the immediate
    e = 32'(v);
    checks++;
    if (ext !== e || ext_sh2 !== 32'(v * 4)) begin
      failures++;
      $display("FAIL imm=%h s=%b ext=%h sh=%h exp=%h", i, s, ext, ext_sh2, e);
    end
  endtask

  initial begin
    check(16'h8000, 1); check(16'h8000, 0); check(16'h7FFF, 1); check(16'hFFFF, 1);
    check(16'hFFFF, 0); check(16'h0000, 1);
    repeat (300) check(16'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
