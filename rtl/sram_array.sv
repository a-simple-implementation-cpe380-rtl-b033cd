// Word-organised storage array built from flip-flops.
//
// The address goes through a decoder that raises exactly one word line.
// A word is written when its line is on, Strobe is on and Read/~Write is low
// (write); every word's output reaches DataOut through a driver enabled by its
// line, so dout always shows the addressed word. This is the structure of the
// course's simple memory. Two departures, both for synchronous, two-state
// logic: the drawing clocks each word with the gated strobe, here the gated
// strobe is a write enable sampled on the common clock; and the per-word
// tri-state drivers are an AND-OR of line and word.
//
// Interface: addr (ABITS), rnotw, strobe, din in; dout out.
// Timing: a write takes effect at the rising edge that samples strobe with
// rnotw = 0; dout follows addr combinationally. Contents are not reset.
module sram_array #(
  parameter int unsigned ABITS = 8,
  parameter int unsigned DBITS = 16
) (
  input  logic             clk,
  input  logic [ABITS-1:0] addr,
  input  logic             rnotw,
  input  logic             strobe,
  input  logic [DBITS-1:0] din,
  output logic [DBITS-1:0] dout
);
  localparam int unsigned DEPTH = 1 << ABITS;

  logic [DBITS-1:0] mem [DEPTH];
  logic [DEPTH-1:0] line;    // decoder outputs, one-hot
  logic             write;   // Strobe AND NOT Read/~Write

  assign line  = DEPTH'(1) << addr;
  assign write = strobe & ~rnotw;

  always_ff @(posedge clk) begin
    for (int i = 0; i < DEPTH; i++) begin
      if (line[i] && write) mem[i] <= din;
    end
  end

  always_comb begin
    dout = '0;
    for (int i = 0; i < DEPTH; i++) begin
      if (line[i]) dout = dout | mem[i];
    end
  end
endmodule
