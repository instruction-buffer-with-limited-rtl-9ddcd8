// tb_adpcm -- the fetch subsystem in its ADPCM configuration (2048-word
// memory, 32-word buffer) running a program with the structure of the ADPCM
// loop that has two early exits: a 31-instruction loop (313..343) closed by an
// unconditional jump, left through a conditional exit at 317 or at 337, with
// an invalidate marker at the common exit target 344. The loop sits in an
// outer loop (189..400) that enters it 50 times; the exit at 317 is taken on
// the 9th pass of each entry, the one at 337 once, on the 20th pass overall
// (4th pass of the 3rd entry). Worked out by hand:
//   copies 50, words written 50*31 = 1550,
//   from the buffer 49*(7*31 + 5) + (2*31 + 25) = 10965,
//   cycles to halt 189 + 50*(124 + 57) + 49*253 + 118 = 21754.
// Every issued instruction is compared with a buffer-less golden model.
module tb_adpcm;
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
  logic [$clog2(32+1)-1:0] buf_valid_cnt;
  logic               run_out_of_buffer, halted;
  ibuf_state_e        state;
  ibuf_events_t       events;

  ibuf_fetch_top #(.IMEM_DEPTH(2048), .BUF_DEPTH(32)) dut (
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

  task automatic build_adpcm();
    clear_prog();
    prog[0]   = mk(0, CTL_MEM, 1, 0, 50);           // outer count
    prog[1]   = mk(1, CTL_MEM, 1, 3, 20);           // exit at 337 on pass 20
    prog[312] = mk(312, CTL_MEM, 1, 2, 9);          // exit at 317 on pass 9
    for (int a = 313; a <= 342; a++) prog[a] = mk(a, CTL_COPY);
    prog[317] = mk(317, CTL_COPY, 5, 2, 0, 344);    // early exit 1
    prog[337] = mk(337, CTL_COPY, 5, 3, 0, 344);    // early exit 2
    prog[343] = mk(343, CTL_COPY, 3, 0, 0, 313);    // loop close
    prog[344] = mk(344, CTL_INVAL);
    prog[400] = mk(400, CTL_MEM, 2, 0, 0, 189);     // outer loop branch
    prog[401] = mk(401, CTL_MEM, 6, 0, 0, 401);     // halt
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
    prog_we = 1'b0; prog_addr = '0; prog_wdata = '0; rst = 1'b1;
    foreach (ev_count[i]) ev_count[i] = 0;
    build_adpcm();
    run(cyc, nbuf, ncopy, nwr);
    $display("ADPCM: %0d cycles, %0d from buffer (%0.1f%%), %0d copies",
             cyc, nbuf, 100.0 * nbuf / cyc, ncopy);
    expect_eq("cycles to halt", cyc, 21754);
    expect_eq("copies", ncopy, 50);
    expect_eq("words copied", nwr, 1550);
    expect_eq("issued from buffer", nbuf, 10965);
    expect_eq("early exits from the buffer", ev_count[6], 50);
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
