// tta_core_model -- behavioural stand-in for the processor's jump behaviour.
//
// Testbench model only, not part of the design. It decodes a toy branch
// format held in the low bits of the 268-bit instruction payload and answers
// each issued instruction, in the same cycle, with jump / jump_target, as the
// fetch stage expects from the processor. Eight loop counters and a 16-bit
// LFSR (for data-dependent branches) update at the clock edge.
//   payload[15:0]  address stamp (the instruction's own address)
//   payload[31:16] branch target
//   payload[34:32] op: 0 nop, 1 set cnt[k]=val, 2 loop (cnt[k]--, jump if
//                  not zero), 3 jump, 4 jump if LFSR bit 0 (LFSR advances),
//                  5 exit (cnt[k]--, jump if zero), 6 halt (jump to self)
//   payload[37:35] k, payload[53:38] val
// The rest of the payload is filler that the testbenches compare as well.
module tta_core_model #(
  parameter int unsigned ADDR_W  = 7,
  parameter int unsigned INSTR_W = 268
) (
  input  logic               clk,
  input  logic               rst,
  input  logic [INSTR_W-1:0] instr,
  output logic               jump,
  output logic [ADDR_W-1:0]  jump_target,
  output logic               halted
);

  localparam logic [2:0] OP_NOP = 3'd0, OP_SET = 3'd1, OP_LOOP = 3'd2,
                         OP_JMP = 3'd3, OP_RAND = 3'd4, OP_EXIT = 3'd5,
                         OP_HALT = 3'd6;

  logic [15:0] cnt [8];
  logic [15:0] lfsr;
  logic [2:0]  op, k;
  logic [15:0] val, dec;

  always_comb begin
    op          = instr[34:32];
    k           = instr[37:35];
    val         = instr[53:38];
    dec         = cnt[k] - 16'd1;
    jump_target = instr[16 +: ADDR_W];
    halted      = (op == OP_HALT);
    unique case (op)
      OP_LOOP: jump = (dec != 16'd0);
      OP_JMP:  jump = 1'b1;
      OP_RAND: jump = lfsr[0];
      OP_EXIT: jump = (dec == 16'd0);
      OP_HALT: jump = 1'b1;
      default: jump = 1'b0;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      lfsr <= 16'hACE1;
      for (int i = 0; i < 8; i++) cnt[i] <= '0;
    end else begin
      if (op == OP_SET) cnt[k] <= val;
      if (op == OP_LOOP || op == OP_EXIT) cnt[k] <= dec;
      if (op == OP_RAND) lfsr <= {lfsr[0] ^ lfsr[2] ^ lfsr[3] ^ lfsr[5], lfsr[15:1]};
    end
  end

endmodule
