// tb_data_mem: random word and byte stores and loads over the whole 128-byte
// memory, checked against a byte-array model (little-endian within a word),
// with sign extension for LB and zero extension for LBU.
module tb_data_mem;
  int checks = 0, failures = 0;
  logic clk = 0, we = 0, re = 0, is_byte = 0, is_unsigned = 0;
  logic [31:0] addr = 0, wdata = 0, rdata;
  logic [7:0] model [128];
  data_mem #(.BYTES(128)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #500000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic store(input logic byte_op, input int a, input logic [31:0] d);
    @(negedge clk);
    we = 1; re = 0; is_byte = byte_op; addr = 32'(a); wdata = d;
    @(posedge clk); #1;
    we = 0;
    if (byte_op) model[a] = d[7:0];
    else for (int i = 0; i < 4; i++) model[(a & ~3) + i] = d[8*i +: 8];
  endtask

  task automatic load(input logic byte_op, input logic uns, input int a);
    logic [31:0] e;
    @(negedge clk);
    re = 1; is_byte = byte_op; is_unsigned = uns; addr = 32'(a);
    #1;
    if (byte_op) e = uns ? {24'd0, model[a]} : 32'(int'(signed'(model[a])));
    else e = {model[(a & ~3) + 3], model[(a & ~3) + 2], model[(a & ~3) + 1], model[a & ~3]};
    checks++;
    if (rdata !== e) begin
      failures++;
      $display("FAIL load byte=%b uns=%b addr=%0d got %h exp %h", byte_op, uns, a, rdata, e);
    end
    re = 0;
  endtask

  initial begin
    for (int w = 0; w < 32; w++) store(0, w * 4, $urandom);
    for (int w = 0; w < 32; w++) load(0, 0, w * 4);
    store(1, 5, 32'h0000_0080);
    load(1, 0, 5); load(1, 1, 5); load(0, 0, 4);
    repeat (800) begin
      if ($urandom_range(0, 1) != 0) store(1'($urandom), $urandom_range(0, 127), $urandom);
      load(1'($urandom), 1'($urandom), $urandom_range(0, 127));
    end
    // read enable low gives zero
    @(negedge clk); re = 0; #1; checks++;
    if (rdata !== 0) begin failures++; $display("FAIL re=0 gives %h", rdata); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
