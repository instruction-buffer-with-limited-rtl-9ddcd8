// ibuf_store -- storage array of the loop instruction buffer.
//
// A DEPTH x WIDTH memory with one write port and one read port. While the
// controller copies a loop, each instruction read from the instruction memory
// is written here at the position given by the controller's counter; while it
// runs from the buffer, the word at the counter is read. Instructions are kept
// with their control bits, because the controller still needs the run and
// invalidate flags when they execute from the buffer.
//
// Timing: the write happens at the rising clock edge when we is high. The read
// is synchronous like the instruction memory's: rdata shows the word at raddr
// one clock after re is high and holds its value while re is low, so the array
// is not read in cycles where the buffer is not the instruction source. A read
// of the entry written at the same edge returns the word being written.
// Depth 76 is the DCT 8x8 configuration of the source design (89 for Viterbi,
// 32 for ADPCM); the two-port register-array organisation is this design's.
module ibuf_store #(
  parameter int unsigned DEPTH  = 76,
  parameter int unsigned WIDTH  = ibuf_pkg::WORD_W,
  parameter int unsigned ADDR_W = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic              clk,
  input  logic              we,
  input  logic [ADDR_W-1:0] waddr,
  input  logic [WIDTH-1:0]  wdata,
  input  logic              re,
  input  logic [ADDR_W-1:0] raddr,
  output logic [WIDTH-1:0]  rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  // Write-first: a read of the entry being written returns the new word.
  // This happens when a one-instruction loop closes its copy and is played
  // back from entry 0 in the very next cycle.
  always_ff @(posedge clk) begin
    if (re) rdata <= (we && waddr == raddr) ? wdata : mem[raddr];
  end

  // The controller never addresses past the end of the buffer.
  assert property (@(posedge clk) we |-> (32'(waddr) < DEPTH));
  assert property (@(posedge clk) re |-> (32'(raddr) < DEPTH));

endmodule
