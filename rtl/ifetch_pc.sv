// ifetch_pc -- program counter of the fetch stage.
//
// pc is the address of the instruction issued in the current cycle; next_pc
// is the address of the one issued in the next cycle: the jump target when the
// processor reports a taken jump for the current instruction, else pc + 1.
// next_pc addresses the synchronous instruction memory and is what the buffer
// controller compares with the stored loop start address.
//
// Timing: pc loads next_pc at every rising clock edge; a synchronous reset
// loads RESET_PC. The source design names next_pc in its controller diagram
// but does not describe its fetch unit; a processor without jump delay slots
// is this design's assumption.
module ifetch_pc #(
  parameter int unsigned ADDR_W   = 7,
  parameter logic [ADDR_W-1:0] RESET_PC = '0
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              jump,
  input  logic [ADDR_W-1:0] jump_target,
  output logic [ADDR_W-1:0] pc,
  output logic [ADDR_W-1:0] next_pc
);

  always_comb next_pc = jump ? jump_target : pc + ADDR_W'(1);

  always_ff @(posedge clk) begin
    if (rst) pc <= RESET_PC;
    else     pc <= next_pc;
  end

endmodule
