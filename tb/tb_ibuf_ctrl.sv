// tb_ibuf_ctrl -- directed test of the buffer controller state machine.
//
// The controller is driven cycle by cycle as the fetch stage would drive it
// (issued instruction's control field, jump decision, pc, next_pc) through
// scripted scenarios with a 4-entry buffer: copying a loop and closing it,
// repeating from the buffer, running off the end of the buffer, re-entering a
// valid buffer, an early exit, an invalidate marker, a loop longer than the
// buffer, an execute-and-invalidate exit into a new copy and an abandoned
// copy. Before each clock edge the source-select, read and write outputs are
// compared with the values written in the script; after it the state.
module tb_ibuf_ctrl;
  import ibuf_pkg::*;

  localparam int unsigned ADDR_W = 8;
  localparam int unsigned DEPTH  = 4;

  logic clk = 1'b0;
  logic rst;
  always #5 clk = ~clk;

  ibuf_ctl_e    ctl;
  logic         jump;
  logic [7:0]   pc, next_pc, buf_start;
  logic         src_buf, mem_en, buf_re, buf_we, buf_valid, run_out_of_buffer;
  logic [1:0]   buf_raddr, buf_waddr;
  logic [2:0]   buf_valid_cnt;
  ibuf_state_e  state;
  ibuf_events_t events;

  ibuf_ctrl #(.ADDR_W(ADDR_W), .BUF_DEPTH(DEPTH)) dut (
    .clk, .rst, .ctl, .jump, .pc, .next_pc,
    .src_buf, .mem_en, .buf_re, .buf_raddr, .buf_we, .buf_waddr,
    .state, .buf_valid, .buf_start, .buf_valid_cnt, .run_out_of_buffer, .events
  );

  int checks = 0, failures = 0;

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL pc=%0d %s: got %0d expected %0d", pc, what, got, exp);
    end
  endtask

  // One issued instruction. src: 1 if it must come from the buffer.
  // nxt_buf: the next one must come from the buffer (raddr then checked),
  // we: it must be copied at waddr (-1: no write). nstate: state afterwards.
  task automatic step(int p, ibuf_ctl_e c, bit j, int np, bit src, bit nxt_buf,
                      int raddr, int waddr, ibuf_state_e nstate);
    pc = 8'(p); ctl = c; jump = j; next_pc = j ? 8'(np) : 8'(p + 1);
    #1;
    chk("src_buf", int'(src_buf), int'(src));
    chk("buf_re", int'(buf_re), int'(nxt_buf));
    chk("mem_en", int'(mem_en), int'(!nxt_buf));
    if (nxt_buf) chk("buf_raddr", int'(buf_raddr), raddr);
    chk("buf_we", int'(buf_we), int'(waddr >= 0));
    if (waddr >= 0) chk("buf_waddr", int'(buf_waddr), waddr);
    @(posedge clk); #1;
    chk("state", int'(state), int'(nstate));
  endtask

  initial begin
    rst = 1'b1; ctl = CTL_MEM; jump = 1'b0; pc = '0; next_pc = '0;
    repeat (2) @(posedge clk); #1;
    rst = 1'b0;
    chk("reset state", int'(state), int'(S_RUN_MEM));
    chk("reset valid", int'(buf_valid), 0);

    // plain code, then a 3-instruction loop 11..13 copied in its first pass
    step(10, CTL_MEM,  0, 0,  0, 0, 0, -1, S_RUN_MEM);
    step(11, CTL_COPY, 0, 0,  0, 0, 0,  0, S_COPY);
    step(12, CTL_COPY, 0, 0,  0, 0, 0,  1, S_COPY);
    step(13, CTL_COPY, 1, 11, 0, 1, 0,  2, S_RUN_BUF);
    chk("valid after copy", int'(buf_valid), 1);
    chk("valid count", int'(buf_valid_cnt), 3);
    chk("loop start", int'(buf_start), 11);
    // second iteration from the buffer, repeat, third iteration falls out
    step(11, CTL_COPY, 0, 0,  1, 1, 1, -1, S_RUN_BUF);
    step(12, CTL_COPY, 0, 0,  1, 1, 2, -1, S_RUN_BUF);
    step(13, CTL_COPY, 1, 11, 1, 1, 0, -1, S_RUN_BUF);
    step(11, CTL_COPY, 0, 0,  1, 1, 1, -1, S_RUN_BUF);
    step(12, CTL_COPY, 0, 0,  1, 1, 2, -1, S_RUN_BUF);
    step(13, CTL_COPY, 0, 0,  1, 0, 0, -1, S_RUN_MEM);
    chk("run out set", int'(run_out_of_buffer), 1);
    step(14, CTL_MEM,  0, 0,  0, 0, 0, -1, S_RUN_MEM);
    chk("run out cleared", int'(run_out_of_buffer), 0);
    // outer loop jumps back; loop re-entered with the buffer still valid
    step(15, CTL_MEM,  1, 11, 0, 0, 0, -1, S_RUN_MEM);
    step(11, CTL_COPY, 0, 0,  0, 1, 1, -1, S_RUN_BUF);
    // early exit from the middle of the loop keeps the content
    step(12, CTL_COPY, 1, 20, 1, 0, 0, -1, S_RUN_MEM);
    chk("valid after exit", int'(buf_valid), 1);
    // invalidate marker
    step(20, CTL_INVAL, 0, 0, 0, 0, 0, -1, S_RUN_MEM);
    chk("invalidated", int'(buf_valid), 0);

    // loop 30..35 is longer than the 4-entry buffer
    step(30, CTL_COPY, 0, 0,  0, 0, 0,  0, S_COPY);
    step(31, CTL_COPY, 0, 0,  0, 0, 0,  1, S_COPY);
    step(32, CTL_COPY, 0, 0,  0, 0, 0,  2, S_COPY);
    step(33, CTL_COPY, 0, 0,  0, 0, 0,  3, S_RUN_MEM);
    chk("full: valid", int'(buf_valid), 1);
    chk("full: count", int'(buf_valid_cnt), 4);
    chk("full: run out", int'(run_out_of_buffer), 1);
    step(34, CTL_COPY, 0, 0,  0, 0, 0, -1, S_RUN_MEM);
    step(35, CTL_COPY, 1, 30, 0, 0, 0, -1, S_RUN_MEM);
    step(30, CTL_COPY, 0, 0,  0, 1, 1, -1, S_RUN_BUF);
    step(31, CTL_COPY, 0, 0,  1, 1, 2, -1, S_RUN_BUF);
    step(32, CTL_COPY, 0, 0,  1, 1, 3, -1, S_RUN_BUF);
    step(33, CTL_COPY, 0, 0,  1, 0, 0, -1, S_RUN_MEM);
    step(34, CTL_COPY, 0, 0,  0, 0, 0, -1, S_RUN_MEM);
    step(35, CTL_COPY, 1, 30, 0, 0, 0, -1, S_RUN_MEM);
    step(30, CTL_COPY, 0, 0,  0, 1, 1, -1, S_RUN_BUF);
    // execute-and-invalidate exit: the target loop 40.. is copied at once
    step(31, CTL_EXEC_INVAL, 1, 40, 1, 0, 0, -1, S_COPY);
    chk("exec-inval: valid", int'(buf_valid), 0);
    chk("exec-inval: start", int'(buf_start), 40);
    step(40, CTL_COPY, 0, 0,  0, 0, 0,  0, S_COPY);
    // jump away during the copy abandons it
    step(41, CTL_COPY, 1, 50, 0, 0, 0,  1, S_RUN_MEM);
    chk("abandoned: valid", int'(buf_valid), 0);
    step(50, CTL_MEM,  0, 0,  0, 0, 0, -1, S_RUN_MEM);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
