// ibuf_pkg -- types and constants shared by the loop instruction buffer.
//
// Every instruction word carries, above its 268-bit payload, a 2-bit
// buffer-control field. Bit 1 is the "run" (copy/execute from buffer) flag and
// bit 0 the "invalidate" flag, which gives the four markings of the scheme:
//   00  execute from memory (the default)
//   10  execute and copy (a loop-body instruction that may live in the buffer)
//   01  invalidate (the buffer content becomes invalid when this executes)
//   11  execute and invalidate (a loop-body instruction that invalidates the
//       buffer when it leaves the buffer)
// The 268/270-bit widths and the use of two extra bits follow the source
// design; which bit means what is this design's own choice, read from the
// "run" and "invalidate" conditions of the controller's state diagram.
package ibuf_pkg;

  // Payload width of one instruction, without the buffer-control bits.
  parameter int unsigned INSTR_W = 268;
  // Width of the buffer-control field appended to every instruction.
  parameter int unsigned CTL_W   = 2;
  // Width of a stored instruction word (payload plus control field).
  parameter int unsigned WORD_W  = INSTR_W + CTL_W;

  typedef enum logic [CTL_W-1:0] {
    CTL_MEM        = 2'b00,
    CTL_INVAL      = 2'b01,
    CTL_COPY       = 2'b10,
    CTL_EXEC_INVAL = 2'b11
  } ibuf_ctl_e;

  // Controller states (Run From Memory, Run from buffer, copy to buffer and
  // run from memory).
  typedef enum logic [1:0] {
    S_RUN_MEM = 2'd0,
    S_RUN_BUF = 2'd1,
    S_COPY    = 2'd2
  } ibuf_state_e;

  // One-cycle event strobes, brought out for activity and coverage counting.
  typedef struct packed {
    logic copy_start;   // first loop instruction written into an invalid buffer
    logic copy_done;    // loop closed during copying: buffer valid, run from it
    logic copy_abort;   // jump away during copying: buffer left invalid
    logic buf_full;     // buffer filled before the loop closed (partial loop)
    logic enter_buf;    // valid buffer re-entered at the loop start
    logic repeat_jmp;   // jump to the loop start while running from the buffer
    logic exit_jmp;     // jump to another address leaves the buffer
    logic run_out;      // last valid buffer entry passed without a jump
    logic invalidate;   // buffer content invalidated
    logic exec_inval;   // execute-and-invalidate exit straight into a new copy
  } ibuf_events_t;

endpackage
