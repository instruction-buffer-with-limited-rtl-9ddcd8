// tb_imem -- test of the instruction memory at its default size (128 x 270).
// Loads every word through the program port, reads all of them back through
// the fetch port in a scrambled order, and checks that the output keeps its
// value in cycles where the memory is not enabled (deselected).
module tb_imem;
  localparam int unsigned DEPTH = 128;
  localparam int unsigned WIDTH = 270;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic             en, prog_we;
  logic [6:0]       addr, prog_addr;
  logic [WIDTH-1:0] rdata, prog_wdata;
  logic [WIDTH-1:0] model [DEPTH];

  imem dut (.clk, .en, .addr, .rdata, .prog_we, .prog_addr, .prog_wdata);

  int checks = 0, failures = 0;

  initial begin
    logic [WIDTH-1:0] held;
    en = 1'b0; prog_we = 1'b0; addr = '0; prog_addr = '0; prog_wdata = '0;
    @(posedge clk); #1;
    for (int a = 0; a < DEPTH; a++) begin
      for (int i = 0; i < WIDTH; i += 32) prog_wdata[i +: 32] = $urandom();
      prog_we = 1'b1; prog_addr = 7'(a); model[a] = prog_wdata;
      @(posedge clk); #1;
    end
    prog_we = 1'b0;
    for (int i = 0; i < DEPTH; i++) begin
      automatic int a = (i * 77 + 3) % DEPTH;
      en = 1'b1; addr = 7'(a);
      @(posedge clk); #1;
      checks++;
      if (rdata !== model[a]) begin failures++; $display("FAIL word %0d", a); end
      // every other read is followed by deselected cycles
      if (i % 2 == 1) begin
        held = rdata; en = 1'b0; addr = 7'(a + 1);
        repeat (2) @(posedge clk);
        #1;
        checks++;
        if (rdata !== held) begin failures++; $display("FAIL output changed while deselected"); end
      end
    end
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
