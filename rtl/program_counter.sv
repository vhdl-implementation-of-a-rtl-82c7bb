// program_counter: the 32-bit program counter register of the fetch stage.
//
// Loads next_pc on the rising clock edge when update is high and keeps its
// value otherwise, so the hazard logic can hold the PC for a stall cycle and
// the same instruction is fetched again. The 32-bit register and the update
// line are as the processor description gives them; the active-low
// asynchronous reset to RESET_PC is this design's choice.
//
// Interface: clk, rst_n, update, next_pc[31:0] -> pc[31:0] (registered).
module program_counter #(
  parameter logic [31:0] RESET_PC = 32'h0000_0000
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        update,
  input  logic [31:0] next_pc,
  output logic [31:0] pc
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      pc <= RESET_PC;
    else if (update) pc <= next_pc;
  end
endmodule
