// ibuf_fetch_top -- instruction fetch with a loop instruction buffer.
//
// The fetch stage of a wide-instruction (TTA) processor extended with a small
// instruction buffer sized for the application's hottest loop. The program
// counter (ifetch_pc) addresses the instruction memory (imem); the controller
// (ibuf_ctrl) copies marked loop bodies into the buffer (ibuf_store) during
// their first iteration and then plays later iterations from the buffer with
// the memory deselected. Every 270-bit word holds a 268-bit payload for the
// processor and the 2-bit buffer-control field read by the controller.
//
// Interface: the processor receives instr (the payload) and pc for the
// instruction issued in the current cycle and answers in the same cycle with
// jump / jump_target (a taken jump and its destination). The processor itself
// is not part of this design. prog_* loads the instruction memory.
// mem_en, buf_re and buf_we are the memory and buffer activity, for power
// estimates; buf_valid, buf_start (loop start address), buf_valid_cnt
// (entries holding the loop) and run_out_of_buffer are the controller's
// status, and events its one-cycle event strobes.
//
// Timing: an instruction is issued every cycle. After rst has been high for
// at least one clock, the first instruction (address RESET_PC) is issued in
// the first cycle with rst low. Defaults are the DCT 8x8 configuration of the
// source design: 128-word memory, 76-word buffer, 270-bit words.
module ibuf_fetch_top
  import ibuf_pkg::*;
#(
  parameter int unsigned IMEM_DEPTH = 128,
  parameter int unsigned BUF_DEPTH  = 76,
  parameter int unsigned ADDR_W     = (IMEM_DEPTH > 1) ? $clog2(IMEM_DEPTH) : 1,
  parameter int unsigned BADDR_W    = (BUF_DEPTH > 1) ? $clog2(BUF_DEPTH) : 1,
  parameter int unsigned CNT_W      = $clog2(BUF_DEPTH + 1),
  parameter logic [ADDR_W-1:0] RESET_PC = '0
) (
  input  logic               clk,
  input  logic               rst,
  // program load
  input  logic               prog_we,
  input  logic [ADDR_W-1:0]  prog_addr,
  input  logic [WORD_W-1:0]  prog_wdata,
  // to and from the processor
  output logic [INSTR_W-1:0] instr,
  output logic [ADDR_W-1:0]  pc,
  input  logic               jump,
  input  logic [ADDR_W-1:0]  jump_target,
  // activity and status
  output logic               src_buf,
  output logic               mem_en,
  output logic               buf_re,
  output logic               buf_we,
  output logic               buf_valid,
  output logic [ADDR_W-1:0]  buf_start,
  output logic [CNT_W-1:0]   buf_valid_cnt,
  output logic               run_out_of_buffer,
  output ibuf_state_e        state,
  output ibuf_events_t       events
);

  logic [ADDR_W-1:0]  next_pc, imem_addr;
  logic [WORD_W-1:0]  mem_word, buf_word, word;
  logic [BADDR_W-1:0] buf_raddr, buf_waddr;
  logic               imem_en;
  ibuf_ctl_e          ctl;

  ifetch_pc #(.ADDR_W(ADDR_W), .RESET_PC(RESET_PC)) u_pc (
    .clk, .rst, .jump, .jump_target, .pc, .next_pc
  );

  // During reset the memory fetches the reset address.
  assign imem_en   = rst | mem_en;
  assign imem_addr = rst ? RESET_PC : next_pc;

  imem #(.DEPTH(IMEM_DEPTH), .WIDTH(WORD_W), .ADDR_W(ADDR_W)) u_imem (
    .clk, .en(imem_en), .addr(imem_addr), .rdata(mem_word),
    .prog_we, .prog_addr, .prog_wdata
  );

  ibuf_store #(.DEPTH(BUF_DEPTH), .WIDTH(WORD_W), .ADDR_W(BADDR_W)) u_buf (
    .clk, .we(buf_we), .waddr(buf_waddr), .wdata(mem_word),
    .re(buf_re), .raddr(buf_raddr), .rdata(buf_word)
  );

  assign word  = src_buf ? buf_word : mem_word;
  assign instr = word[INSTR_W-1:0];
  assign ctl   = ibuf_ctl_e'(word[WORD_W-1 -: CTL_W]);

  ibuf_ctrl #(
    .ADDR_W(ADDR_W), .BUF_DEPTH(BUF_DEPTH), .BADDR_W(BADDR_W), .CNT_W(CNT_W)
  ) u_ctrl (
    .clk, .rst, .ctl, .jump, .pc, .next_pc,
    .src_buf, .mem_en, .buf_re, .buf_raddr, .buf_we, .buf_waddr,
    .state, .buf_valid, .buf_start, .buf_valid_cnt, .run_out_of_buffer, .events
  );

endmodule
