// tb_ibuf_fetch_top -- end-to-end test of the fetch subsystem at its default
// size (128-word memory, 76-word buffer, 270-bit words).
//
// A behavioural processor (tta_core_model) executes the issued instructions
// and answers with its jumps. A second, golden copy of the same model runs on
// a plain array copy of the program, with no buffer at all; every cycle the
// payload and pc issued by the design must equal the golden instruction.
//
// Programs:
//  * DCT-shaped loop nest (three loops: 4 x 8 x 8 iterations, innermost loop
//    at addresses 12..87, 76 instructions), run three times with the
//    invalidate marker after the inner loop (88), after the middle loop (97)
//    and after the outer loop (107). The expected number of copies, copied
//    words and buffer-issued instructions are worked out below by hand:
//    the innermost loop is entered 32 times and runs 8 iterations per entry.
//      marker 88 : 32 copies, 32*76 = 2432 words written, 32*7*76 = 17024
//                  instructions from the buffer
//      marker 97 :  4 copies,  304 written, 4*532 + 28*607 = 19124 from buffer
//      marker 107:  1 copy,     76 written, 532 + 31*607   = 19349 from buffer
//    (607 = 75 + 7*76: a re-entered valid buffer takes over after the loop's
//    first instruction, which is fetched from memory.)
//    The halt instruction must be reached after exactly 19875 cycles.
//  * A mechanism program: a loop longer than the buffer, a loop with an
//    early continue and an early exit marked execute-and-invalidate that
//    jumps straight into a following loop, an invalidate marker, and a loop
//    left during its first (copying) iteration.
// Every controller event must occur at least once over the whole test.
module tb_ibuf_fetch_top;
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
  logic [6:0]         buf_valid_cnt;
  logic               run_out_of_buffer, halted;
  ibuf_state_e        state;
  ibuf_events_t       events;

  ibuf_fetch_top dut (
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

  // ---------------------------------------------------------------- program
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

  // DCT-shaped nest, after the structure of the 8x8 DCT kernel.
  task automatic build_dct(int inval_at);
    clear_prog();
    prog[0]   = mk(0, CTL_MEM, 1, 0, 4);            // outer count
    prog[7]   = mk(7, CTL_MEM, 1, 1, 8);            // middle count
    prog[10]  = mk(10, CTL_MEM, 1, 2, 8);           // inner count
    for (int a = 12; a <= 86; a++) prog[a] = mk(a, CTL_COPY);
    prog[87]  = mk(87, CTL_COPY, 2, 2, 0, 12);      // inner loop branch
    prog[96]  = mk(96, CTL_MEM, 2, 1, 0, 10);       // middle loop branch
    prog[106] = mk(106, CTL_MEM, 2, 0, 0, 7);       // outer loop branch
    prog[115] = mk(115, CTL_MEM, 6, 0, 0, 115);     // halt
    prog[inval_at][WORD_W-1 -: CTL_W] = CTL_INVAL;
  endtask

  // Mechanism program.
  task automatic build_mech();
    clear_prog();
    prog[0] = mk(0, CTL_MEM, 1, 0, 5);
    prog[1] = mk(1, CTL_MEM, 1, 3, 6);
    // L1: 80 instructions (2..81), longer than the 76-entry buffer
    for (int a = 2; a <= 80; a++) prog[a] = mk(a, CTL_COPY);
    prog[81] = mk(81, CTL_COPY, 2, 0, 0, 2);
    prog[82] = mk(82, CTL_MEM, 1, 1, 20);
    prog[83] = mk(83, CTL_INVAL, 1, 2, 3);
    // L2: 84..103 with an early exit at 95 and an early continue at 100
    for (int a = 84; a <= 102; a++) prog[a] = mk(a, CTL_COPY);
    prog[95]  = mk(95, CTL_EXEC_INVAL, 5, 2, 0, 104);
    prog[100] = mk(100, CTL_COPY, 4, 0, 0, 84);
    prog[103] = mk(103, CTL_COPY, 2, 1, 0, 84);
    // L3: 104..109, entered straight from the L2 exit
    for (int a = 104; a <= 108; a++) prog[a] = mk(a, CTL_COPY);
    prog[109] = mk(109, CTL_COPY, 2, 3, 0, 104);
    prog[110] = mk(110, CTL_INVAL, 1, 4, 1);
    // L4: 111..114, left during its first iteration
    prog[111] = mk(111, CTL_COPY);
    prog[112] = mk(112, CTL_COPY, 5, 4, 0, 120);
    prog[113] = mk(113, CTL_COPY);
    prog[114] = mk(114, CTL_COPY, 3, 0, 0, 111);
    prog[120] = mk(120, CTL_MEM, 6, 0, 0, 120);
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
    while (!ghalted && cyc < 100000) begin
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
    automatic int marker [3] = '{88, 97, 107};
    automatic int exp_copy [3] = '{32, 4, 1};
    automatic int exp_buf [3] = '{17024, 19124, 19349};
    prog_we = 1'b0; prog_addr = '0; prog_wdata = '0; rst = 1'b1;
    foreach (ev_count[i]) ev_count[i] = 0;

    for (int m = 0; m < 3; m++) begin
      build_dct(marker[m]);
      run(cyc, nbuf, ncopy, nwr);
      $display("DCT nest, invalidate at %0d: %0d cycles, %0d from buffer, %0d copies",
               marker[m], cyc, nbuf, ncopy);
      expect_eq("cycles to halt", cyc, 19875);
      expect_eq("copies", ncopy, exp_copy[m]);
      expect_eq("words copied", nwr, exp_copy[m] * 76);
      expect_eq("issued from buffer", nbuf, exp_buf[m]);
    end

    build_mech();
    run(cyc, nbuf, ncopy, nwr);
    $display("mechanism program: %0d cycles, %0d from buffer, %0d copies", cyc, nbuf, ncopy);
    checks++;
    if (cyc >= 100000) begin failures++; $display("FAIL mechanism program did not halt"); end

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
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
