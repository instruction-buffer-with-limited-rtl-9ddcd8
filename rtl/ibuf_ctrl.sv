// ibuf_ctrl -- state machine controlling the loop instruction buffer.
//
// The controller decides, for every fetched instruction, whether it comes from
// the instruction memory or from the buffer, and copies a marked loop body into
// the buffer during the loop's first iteration. Buffer entries carry no
// addresses: the buffer is simply played from its first entry, and the
// controller only stores the address of the loop start (buf_start) and
// compares the next fetch address with it on every taken jump. A jump to the
// loop start repeats the loop from the buffer; a jump anywhere else (an early
// exit) leaves the buffer. This is what lets loops with early "continue" and
// early "break" branches run from the buffer.
//
// States (after the source design's state diagram):
//   S_RUN_MEM  Run From Memory          buffer off, memory on
//   S_RUN_BUF  Run from buffer          buffer read, memory deselected
//   S_COPY     copy to buffer and run   memory read, buffer written
//                from memory
// Transitions, all evaluated on the instruction issued in the current cycle
// (its control field ctl, the processor's jump decision and next_pc):
//   RUN_MEM: a "run" instruction (10/11) with the buffer invalid is written to
//     entry 0, its address becomes buf_start, and copying continues (COPY).
//     A "run" instruction at buf_start with the buffer valid and no jump hands
//     the rest of the loop to the buffer, from entry 1 (RUN_BUF). While
//     run_out_of_buffer is set (the tail of a loop longer than the buffer is
//     executing) neither happens; a jump or a non-loop instruction clears it.
//     An invalidate (01) instruction clears the valid flag; an
//     execute-and-invalidate (11) one does so when it jumps away from the loop.
//   COPY: the issued instruction is written to entry counter. A jump back to
//     buf_start makes the buffer valid with buffer_valid_counter = counter+1
//     entries and continues from entry 0 (RUN_BUF). Filling the last entry
//     without a jump also makes the buffer valid, and the rest of the loop
//     runs from memory with run_out_of_buffer set (RUN_MEM). A jump elsewhere
//     abandons the copy with the buffer left invalid (RUN_MEM).
//   RUN_BUF: a jump to buf_start restarts from entry 0. A jump elsewhere by an
//     execute-and-invalidate instruction invalidates the buffer and starts
//     copying the jump target as the next loop (COPY). Any other jump leaves
//     to memory (RUN_MEM). Passing the last valid entry without a jump leaves
//     to memory with run_out_of_buffer set. Leaving the buffer through an
//     instruction with the invalidate bit set invalidates the buffer.
// The state names, the per-state enables, buf_start, buffer_valid_counter,
// run_out_of_buffer and the transition conditions follow the source design's
// diagram. This design's own choices: entry into a valid buffer is recognised
// by pc == buf_start (where the diagram compares a counter with the maximum),
// the abandoned copy on a jump away from the loop during copying (the diagram
// shows no such transition), and the exact encoding of the control bits.
//
// Interface and timing: the instruction memory and the buffer both have a
// synchronous read. In the cycle an instruction is issued, the controller
// computes the source of the next one: mem_en / buf_re / buf_raddr are the
// read requests for the next cycle, src_buf says where the current instruction
// came from, and buf_we / buf_waddr write the current instruction (taken from
// the memory output) into the buffer at the next clock edge. Synchronous
// active-high reset: run from memory, buffer invalid.
module ibuf_ctrl
  import ibuf_pkg::*;
#(
  parameter int unsigned ADDR_W    = 7,
  parameter int unsigned BUF_DEPTH = 76,
  parameter int unsigned BADDR_W   = (BUF_DEPTH > 1) ? $clog2(BUF_DEPTH) : 1,
  parameter int unsigned CNT_W     = $clog2(BUF_DEPTH + 1)
) (
  input  logic               clk,
  input  logic               rst,
  // issued instruction and the processor's decision on it
  input  ibuf_ctl_e          ctl,
  input  logic               jump,
  input  logic [ADDR_W-1:0]  pc,
  input  logic [ADDR_W-1:0]  next_pc,
  // source selection
  output logic               src_buf,     // current instruction is from the buffer
  output logic               mem_en,      // read the memory for the next cycle
  output logic               buf_re,      // read the buffer for the next cycle
  output logic [BADDR_W-1:0] buf_raddr,
  output logic               buf_we,      // copy the current instruction
  output logic [BADDR_W-1:0] buf_waddr,
  // status
  output ibuf_state_e        state,
  output logic               buf_valid,
  output logic [ADDR_W-1:0]  buf_start,
  output logic [CNT_W-1:0]   buf_valid_cnt,
  output logic               run_out_of_buffer,
  output ibuf_events_t       events
);

  logic [CNT_W-1:0] counter;

  ibuf_state_e      state_n;
  logic [CNT_W-1:0] counter_n, valid_cnt_n, copy_idx;
  logic [ADDR_W-1:0] start_n, copy_start;
  logic             valid_n, run_out_n;
  logic             run_f, inval_f, copy_now;

  always_comb begin
    run_f   = ctl[1];
    inval_f = ctl[0];

    // Copying happens in COPY, and in RUN_MEM on the first loop instruction
    // met with the buffer invalid (that instruction becomes entry 0).
    copy_now   = (state == S_COPY) ||
                 (state == S_RUN_MEM && run_f && !buf_valid && !run_out_of_buffer);
    copy_idx   = (state == S_COPY) ? counter : '0;
    copy_start = (state == S_COPY) ? buf_start : pc;

    state_n     = state;
    counter_n   = counter;
    start_n     = buf_start;
    valid_n     = buf_valid;
    valid_cnt_n = buf_valid_cnt;
    run_out_n   = run_out_of_buffer;
    events      = '0;

    if (copy_now) begin
      start_n = copy_start;
      events.copy_start = (state == S_RUN_MEM);
      if (jump && next_pc == copy_start) begin
        valid_n          = 1'b1;
        valid_cnt_n      = copy_idx + CNT_W'(1);
        counter_n        = '0;
        state_n          = S_RUN_BUF;
        events.copy_done = 1'b1;
      end else if (jump) begin
        valid_n           = 1'b0;
        counter_n         = '0;
        state_n           = S_RUN_MEM;
        events.copy_abort = 1'b1;
      end else if (copy_idx + CNT_W'(1) == CNT_W'(BUF_DEPTH)) begin
        valid_n         = 1'b1;
        valid_cnt_n     = CNT_W'(BUF_DEPTH);
        counter_n       = '0;
        run_out_n       = 1'b1;
        state_n         = S_RUN_MEM;
        events.buf_full = 1'b1;
      end else begin
        counter_n = copy_idx + CNT_W'(1);
        state_n   = S_COPY;
      end
    end else begin
      unique case (state)
        S_RUN_BUF: begin
          if (jump && next_pc == buf_start) begin
            counter_n         = '0;
            events.repeat_jmp = 1'b1;
          end else if (jump && run_f && inval_f) begin
            // execute and invalidate: the jump target starts the next loop
            valid_n           = 1'b0;
            start_n           = next_pc;
            counter_n         = '0;
            state_n           = S_COPY;
            events.exit_jmp   = 1'b1;
            events.invalidate = 1'b1;
            events.exec_inval = 1'b1;
          end else if (jump) begin
            counter_n         = '0;
            state_n           = S_RUN_MEM;
            valid_n           = buf_valid && !inval_f;
            events.exit_jmp   = 1'b1;
            events.invalidate = inval_f;
          end else if (counter + CNT_W'(1) == buf_valid_cnt) begin
            counter_n         = '0;
            run_out_n         = 1'b1;
            state_n           = S_RUN_MEM;
            valid_n           = buf_valid && !inval_f;
            events.run_out    = 1'b1;
            events.invalidate = inval_f;
          end else begin
            counter_n = counter + CNT_W'(1);
          end
        end
        default: begin  // S_RUN_MEM
          if (run_f && buf_valid && !run_out_of_buffer && !jump &&
              pc == buf_start && buf_valid_cnt > CNT_W'(1)) begin
            counter_n        = CNT_W'(1);
            state_n          = S_RUN_BUF;
            events.enter_buf = 1'b1;
          end else begin
            counter_n = '0;
            if (jump || !run_f) run_out_n = 1'b0;
            // invalidate: always; execute and invalidate: when leaving the loop
            if (inval_f && (!run_f || (jump && next_pc != buf_start))) begin
              valid_n           = 1'b0;
              events.invalidate = buf_valid;
            end
          end
        end
      endcase
    end

    src_buf   = (state == S_RUN_BUF);
    buf_re    = (state_n == S_RUN_BUF);
    mem_en    = (state_n != S_RUN_BUF);
    buf_raddr = BADDR_W'(counter_n);
    buf_we    = copy_now;
    buf_waddr = BADDR_W'(copy_idx);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state             <= S_RUN_MEM;
      counter           <= '0;
      buf_start         <= '0;
      buf_valid         <= 1'b0;
      buf_valid_cnt     <= '0;
      run_out_of_buffer <= 1'b0;
    end else begin
      state             <= state_n;
      counter           <= counter_n;
      buf_start         <= start_n;
      buf_valid         <= valid_n;
      buf_valid_cnt     <= valid_cnt_n;
      run_out_of_buffer <= run_out_n;
    end
  end

  // While running from the buffer the counter stays inside the valid part.
  assert property (@(posedge clk) disable iff (rst)
    state == S_RUN_BUF |-> (buf_valid && counter < buf_valid_cnt));
  // The memory is deselected exactly when the buffer is the next source.
  assert property (@(posedge clk) disable iff (rst) mem_en != buf_re);
  // Never write the buffer while it is the instruction source.
  assert property (@(posedge clk) disable iff (rst) buf_we |-> !src_buf);

endmodule
