// imem -- instruction memory of the processor.
//
// A DEPTH x WIDTH single-read-port memory. The fetch reads one word per clock
// when en (the controller's mem_en) is high; when en is low the array is not
// accessed and rdata keeps its last value, which models a memory held in its
// deselected, low-power mode while instructions come from the buffer.
// A separate write port (prog_*) loads the program; the source design does not
// say how its memory is filled, so this port is this design's own choice.
//
// Timing: synchronous read, rdata is the word at addr one clock after en.
// Depth 128 and width 270 are the DCT 8x8 configuration of the source design
// (2048 x 270 for the Viterbi and ADPCM configurations).
module imem #(
  parameter int unsigned DEPTH  = 128,
  parameter int unsigned WIDTH  = ibuf_pkg::WORD_W,
  parameter int unsigned ADDR_W = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic              clk,
  input  logic              en,
  input  logic [ADDR_W-1:0] addr,
  output logic [WIDTH-1:0]  rdata,
  input  logic              prog_we,
  input  logic [ADDR_W-1:0] prog_addr,
  input  logic [WIDTH-1:0]  prog_wdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (prog_we) mem[prog_addr] <= prog_wdata;
  end

  always_ff @(posedge clk) begin
    if (en) rdata <= mem[addr];
  end

endmodule
