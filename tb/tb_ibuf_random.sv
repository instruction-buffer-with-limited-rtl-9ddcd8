// tb_ibuf_random -- randomized equivalence test of the fetch subsystem with a
// small (8-entry) buffer, so that loops longer than the buffer are common.
//
// Each of 150 programs fills the 128-word memory with random instructions:
// random control markings (all four codes) and a random mix of counted
// backward loops, data-dependent jumps, early exits and plain jumps. Whatever
// the marking, the buffer must never change what the program does, so every
// issued instruction and pc is compared with a buffer-less golden model for
// 4000 cycles per program. The memory and buffer must never be enabled
// together, and every controller event must occur.
module tb_ibuf_random;
  import ibuf_pkg::*;

  localparam int unsigned DEPTH  = 128;
  localparam int unsigned ADDR_W = 7;

  logic clk = 1'b0;
  logic rst;
  always #5 clk = ~clk;

  logic               prog_we;
  logic [ADDR_W-1:0]  prog_addr;
  logic [WORD_W-1:0]  prog_wdata;
  logic [INSTR_W-1:0] instr;
  logic [ADDR_W-1:0]  pc;
  logic               jump, src_buf, mem_en, buf_re, buf_we, buf_valid;
  logic [ADDR_W-1:0]  jump_target, buf_start;
  logic [3:0]         buf_valid_cnt;
  logic               run_out_of_buffer, halted;
  ibuf_state_e        state;
  ibuf_events_t       events;

  ibuf_fetch_top #(.BUF_DEPTH(8)) dut (
    .clk, .rst, .prog_we, .prog_addr, .prog_wdata,
    .instr, .pc, .jump, .jump_target,
    .src_buf, .mem_en, .buf_re, .buf_we, .buf_valid,
    .buf_start, .buf_valid_cnt, .run_out_of_buffer, .state, .events
  );

  tta_core_model #(.ADDR_W(ADDR_W)) u_core (
    .clk, .rst, .instr, .jump, .jump_target, .halted
  );

  // Golden reference: same processor model, program array, no buffer.
  logic [WORD_W-1:0]  prog [DEPTH];
  logic [ADDR_W-1:0]  gpc;
  logic [INSTR_W-1:0] ginstr;
  logic               gjump, ghalted;
  logic [ADDR_W-1:0]  gtarget;
  assign ginstr = prog[gpc][INSTR_W-1:0];
  tta_core_model #(.ADDR_W(ADDR_W)) u_gold (
    .clk, .rst, .instr(ginstr), .jump(gjump), .jump_target(gtarget), .halted(ghalted)
  );
  always_ff @(posedge clk) begin
    if (rst) gpc <= '0;
    else     gpc <= gjump ? gtarget : gpc + 1'b1;
  end

  int checks = 0, failures = 0;
  int ev_count [10];
  string ev_name [10] = '{"copy_start", "copy_done", "copy_abort", "buf_full",
                          "enter_buf", "repeat_jmp", "exit_jmp", "run_out",
                          "invalidate", "exec_inval"};

  function automatic logic [WORD_W-1:0] mk(int a, ibuf_ctl_e c, int op = 0,
                                           int k = 0, int v = 0, int t = 0);
    logic [INSTR_W-1:0] p;
    for (int i = 0; i < INSTR_W; i += 32)
      p[i +: 32] = 32'(a * 32'h9E3779B1 + i * 32'h85EBCA6B);
    p[15:0]  = 16'(a);
    p[31:16] = 16'(t);
    p[34:32] = 3'(op);
    p[37:35] = 3'(k);
    p[53:38] = 16'(v);
    return {c, p};
  endfunction

  task automatic clear_prog();
    for (int a = 0; a < DEPTH; a++) prog[a] = mk(a, CTL_MEM);
  endtask


  task automatic build_random();
    for (int a = 0; a < DEPTH; a++) begin
      automatic int r = $urandom_range(0, 99);
      automatic int m = $urandom_range(0, 9);
      automatic int k = $urandom_range(0, 7);
      automatic int op = 0, v = 0, t = 0;
      ibuf_ctl_e c;
      unique case (m)
        0, 1, 2, 3, 4: c = CTL_COPY;
        5, 6:          c = CTL_MEM;
        7, 8:          c = CTL_INVAL;
        default:       c = CTL_EXEC_INVAL;
      endcase
      if (r < 12) begin                       // counted loop back 1..24
        op = 2; t = a - $urandom_range(0, (a >= 24) ? 23 : a);
      end else if (r < 22) begin              // set a loop counter
        op = 1; v = $urandom_range(1, 12);
      end else if (r < 28) begin              // data-dependent jump
        op = 4; t = $urandom_range(0, DEPTH - 1);
      end else if (r < 33) begin              // early exit forward
        op = 5; t = (a + $urandom_range(1, 20)) % DEPTH;
      end else if (r < 35) begin              // plain jump
        op = 3; t = $urandom_range(0, DEPTH - 1);
      end
      // exits are often marked execute-and-invalidate
      if ((op == 4 || op == 5) && $urandom_range(0, 2) == 0) c = CTL_EXEC_INVAL;
      prog[a] = mk(a, c, op, k, v, t);
    end
  endtask

  initial begin
    automatic int nbuf = 0, ncopy = 0;
    prog_we = 1'b0; prog_addr = '0; prog_wdata = '0; rst = 1'b1;
    foreach (ev_count[i]) ev_count[i] = 0;
    for (int p = 0; p < 150; p++) begin
      build_random();
      rst = 1'b1;
      for (int a = 0; a < DEPTH; a++) begin
        prog_we = 1'b1; prog_addr = ADDR_W'(a); prog_wdata = prog[a];
        @(posedge clk); #1;
      end
      prog_we = 1'b0;
      @(posedge clk); #1;
      rst = 1'b0;
      for (int cyc = 0; cyc < 4000; cyc++) begin
        #3;
        checks++;
        if (instr !== ginstr || pc !== gpc) begin
          failures++;
          if (failures < 10)
            $display("MISMATCH program %0d cycle %0d: pc %0d (golden %0d) src_buf %0d",
                     p, cyc, pc, gpc, src_buf);
        end
        checks++;
        if (mem_en == buf_re) failures++;
        nbuf  += int'(src_buf);
        ncopy += int'(events.copy_start);
        for (int i = 0; i < 10; i++) ev_count[i] += int'(events[9-i]);
        @(posedge clk); #1;
      end
    end
    $display("random programs: %0d instructions from the buffer, %0d copies", nbuf, ncopy);
    for (int i = 0; i < 10; i++) begin
      $display("event %-11s %0d", ev_name[i], ev_count[i]);
      checks++;
      if (ev_count[i] == 0) begin
        failures++;
        $display("FAIL event %s never happened", ev_name[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
