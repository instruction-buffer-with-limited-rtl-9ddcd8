// tb_ibuf_store -- test of the buffer storage array at its default size
// (76 x 270). Fills every entry with distinct data, reads all entries back in
// a scrambled order, checks that rdata holds while re is low, that a write
// does not disturb the held output, that reads see data written earlier, and
// that a read of the entry being written returns the new word.
module tb_ibuf_store;
  localparam int unsigned DEPTH = 76;
  localparam int unsigned WIDTH = 270;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic             we, re;
  logic [6:0]       waddr, raddr;
  logic [WIDTH-1:0] wdata, rdata;
  logic [WIDTH-1:0] model [DEPTH];

  ibuf_store dut (.clk, .we, .waddr, .wdata, .re, .raddr, .rdata);

  int checks = 0, failures = 0;

  function automatic logic [WIDTH-1:0] pattern(int a, int seed);
    logic [WIDTH-1:0] w;
    for (int i = 0; i < WIDTH; i += 32) w[i +: 32] = 32'(a * 32'h01000193 ^ (seed + i) * 32'h9E3779B1);
    return w;
  endfunction

  task automatic rd(int a);
    re = 1'b1; raddr = 7'(a);
    @(posedge clk); #1;
    re = 1'b0;
    checks++;
    if (rdata !== model[a]) begin
      failures++;
      $display("FAIL read entry %0d", a);
    end
  endtask

  initial begin
    logic [WIDTH-1:0] held;
    we = 1'b0; re = 1'b0; waddr = '0; raddr = '0; wdata = '0;
    @(posedge clk); #1;
    for (int a = 0; a < DEPTH; a++) begin
      we = 1'b1; waddr = 7'(a); wdata = pattern(a, 1); model[a] = wdata;
      @(posedge clk); #1;
    end
    we = 1'b0;
    for (int i = 0; i < DEPTH; i++) rd((i * 29 + 7) % DEPTH);
    // output holds while re is low, also across a write
    held = rdata;
    we = 1'b1; waddr = 7'd5; wdata = pattern(5, 2); model[5] = wdata;
    raddr = 7'd9;
    repeat (3) @(posedge clk);
    #1; we = 1'b0;
    checks++;
    if (rdata !== held) begin failures++; $display("FAIL rdata did not hold"); end
    rd(5);
    rd(DEPTH - 1);
    // overwrite half the entries and read everything again
    for (int a = 0; a < DEPTH; a += 2) begin
      we = 1'b1; waddr = 7'(a); wdata = pattern(a, 3); model[a] = wdata;
      @(posedge clk); #1;
    end
    we = 1'b0;
    for (int a = DEPTH - 1; a >= 0; a--) rd(a);
    // a read of the entry written at the same edge returns the new word
    we = 1'b1; waddr = 7'd0; wdata = pattern(0, 4); model[0] = wdata;
    re = 1'b1; raddr = 7'd0;
    @(posedge clk); #1;
    we = 1'b0; re = 1'b0;
    checks++;
    if (rdata !== model[0]) begin failures++; $display("FAIL write-first read"); end
    rd(0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
