// tb_viterbi -- the fetch subsystem in its Viterbi configuration (2048-word
// memory, 89-word buffer) running a program with the loop structure of the
// Viterbi decoder: an outer loop (addresses 7..136) around an 89-instruction
// inner loop (21..109). The outer loop runs 528 times and the inner loop 32
// times per entry, the numbers for which the copy and loop-iteration counts
// of the profiled decoder (46992 words copied, 1456752 instructions in
// buffered iterations) come out exactly. Two runs:
//   simple buffer (invalidate marker right after the inner loop, at 110):
//     528 copies, 528*89 = 46992 words written, 528*31*89 = 1456752
//     instructions from the buffer
//   invalidate marker after the outer loop (137):
//     1 copy, 89 words, 31*89 + 527*(88 + 31*89) = 1503128 from the buffer
// Both must halt after 7 + 528*(14 + 32*89 + 27) + 6 = 1525405 cycles, and
// every issued instruction is compared with a buffer-less golden model.
module tb_viterbi;
  import ibuf_pkg::*;

  localparam int unsigned DEPTH  = 2048;
  localparam int unsigned ADDR_W = 11;

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
  logic [$clog2(89+1)-1:0] buf_valid_cnt;
  logic               run_out_of_buffer, halted;
  ibuf_state_e        state;
  ibuf_events_t       events;

  ibuf_fetch_top #(.IMEM_DEPTH(2048), .BUF_DEPTH(89)) dut (
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

  task automatic build_viterbi(int inval_at);
    clear_prog();
    prog[0]   = mk(0, CTL_MEM, 1, 0, 528);          // outer count
    prog[7]   = mk(7, CTL_MEM, 1, 1, 32);           // inner count
    for (int a = 21; a <= 108; a++) prog[a] = mk(a, CTL_COPY);
    prog[109] = mk(109, CTL_COPY, 2, 1, 0, 21);     // inner loop branch
    prog[136] = mk(136, CTL_MEM, 2, 0, 0, 7);       // outer loop branch
    prog[143] = mk(143, CTL_MEM, 6, 0, 0, 143);     // halt
    prog[inval_at][WORD_W-1 -: CTL_W] = CTL_INVAL;
  endtask

  // Load, reset, run to halt; returns cycles, buffer-issued instructions,
  // copy starts and buffer writes.
  task automatic run(output int cyc, output int nbuf, output int ncopy,
                     output int nwr);
    rst = 1'b1;
    for (int a = 0; a < DEPTH; a++) begin
      prog_we = 1'b1; prog_addr = ADDR_W'(a); prog_wdata = prog[a];
      @(posedge clk); #1;
    end
    prog_we = 1'b0;
    @(posedge clk); #1;
    rst = 1'b0;
    cyc = 0; nbuf = 0; ncopy = 0; nwr = 0;
    while (!ghalted && cyc < 3000000) begin
      #3;  // sample mid-cycle
      checks++;
      if (instr !== ginstr || pc !== gpc) begin
        failures++;
        if (failures < 10)
          $display("MISMATCH cycle %0d: pc %0d (golden %0d) stamp %0d src_buf %0d",
                   cyc, pc, gpc, instr[15:0], src_buf);
      end
      checks++;
      if (mem_en == buf_re) begin
        failures++;
        $display("memory and buffer both %0s at cycle %0d", mem_en ? "on" : "off", cyc);
      end
      nbuf  += int'(src_buf);
      ncopy += int'(events.copy_start);
      nwr   += int'(buf_we);
      for (int i = 0; i < 10; i++) ev_count[i] += int'(events[9-i]);
      @(posedge clk); #1;
      cyc++;
    end
  endtask

  task automatic expect_eq(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end else
      $display("ok   %s = %0d", what, got);
  endtask

  initial begin
    int cyc, nbuf, ncopy, nwr;
    automatic int marker [2] = '{110, 137};
    automatic int exp_copy [2] = '{528, 1};
    automatic int exp_buf [2] = '{1456752, 1503128};
    prog_we = 1'b0; prog_addr = '0; prog_wdata = '0; rst = 1'b1;
    for (int m = 0; m < 2; m++) begin
      build_viterbi(marker[m]);
      run(cyc, nbuf, ncopy, nwr);
      $display("Viterbi, invalidate at %0d: %0d cycles, %0d from buffer (%0.1f%%), %0d copies",
               marker[m], cyc, nbuf, 100.0 * nbuf / cyc, ncopy);
      expect_eq("cycles to halt", cyc, 1525405);
      expect_eq("copies", ncopy, exp_copy[m]);
      expect_eq("words copied", nwr, exp_copy[m] * 89);
      expect_eq("issued from buffer", nbuf, exp_buf[m]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
