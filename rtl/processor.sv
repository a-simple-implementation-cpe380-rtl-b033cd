// The simple MIPS-subset processor: datapath, microprogrammed control and
// the memory-request logic.
//
// The processor executes add, and, lw and sw, several clocks per
// instruction. Each instruction starts with the fetch sequence (read the word
// at PC into IR while PC+4 is computed through Y and the ALU), dispatches on
// the opcode and runs its own states; anything else halts the machine.
//
// Memory interface: addr is MAR and dwrite is MDR. A state with MEMread or
// MEMwrite loads MAR in the same cycle, so the request is registered: strobe
// is high for the one cycle after that state, with rnotw set for a read and
// cleared for a write (rnotw keeps its value between requests and is 1 after
// reset). mfc from memory makes MDR load dread and lets an UNTILmfc state
// move on. The registered strobe is this design's own choice.
//
// Timing with a two-cycle memory: fetch takes 5 clocks (Start, two of the
// UNTILmfc state, MDRout/IRin, dispatch); add and and then take 3 more, lw 6
// more, sw 4 more. halt rises one clock after the HALT state is entered.
module processor
  import mips_pkg::*;
(
  input  logic  clk,
  input  logic  reset,
  output logic  halt,
  input  logic  mfc,
  input  word_t dread,
  output word_t dwrite,
  output word_t addr,
  output logic  rnotw,
  output logic  strobe
);
  ctrl_word_t cw;
  word_t      ir;

  control_unit u_ctrl (
    .clk   (clk),
    .reset (reset),
    .ir    (ir),
    .mfc   (mfc),
    .cw    (cw),
    .state (),
    .halt  (halt)
  );

  datapath u_dp (
    .clk   (clk),
    .reset (reset),
    .cw    (cw),
    .mfc   (mfc),
    .dread (dread),
    .ir    (ir),
    .pc    (),
    .mar   (addr),
    .mdr   (dwrite),
    .z     (),
    .bus   ()
  );

  always_ff @(posedge clk) begin
    if (reset) begin
      strobe <= 1'b0;
      rnotw  <= 1'b1;
    end else begin
      strobe <= cw.mem_read || cw.mem_write;
      if (cw.mem_read || cw.mem_write) rnotw <= cw.mem_read;
    end
  end
endmodule
