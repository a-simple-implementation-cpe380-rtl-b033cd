// Microprogrammed control of the single-bus processor.
//
// A state register steps through the microprogram in mips_pkg::microcode;
// cw is the control word of the current state and drives the datapath. The
// next state is chosen in this order:
//   halted           : stay (halt stays high until reset)
//   HALT in the state: halt rises at the end of this state, machine stops
//   UNTILmfc, mfc low: repeat the state (wait for the memory)
//   JUMP(label)      : go to label
//   JUMPop and a hit : go to the label the decode table gives for IR
//   otherwise        : go to the next state number
// So an instruction runs Start (fetch), dispatches on its opcode, runs its
// own states and jumps back to Start; an instruction that matches nothing
// falls through to the HALT state after the dispatch state. This is the
// course's control scheme and microprogram; the state numbering and the
// masking of cw to "no signals" once halted are this design's own.
//
// Interface: ir from the datapath, mfc from memory; cw, state and halt out.
// Timing: one state per clock; reset (synchronous) returns to Start.
module control_unit
  import mips_pkg::*;
(
  input  logic       clk,
  input  logic       reset,
  input  word_t      ir,
  input  logic       mfc,
  output ctrl_word_t cw,
  output ustate_t    state,
  output logic       halt
);
  ctrl_word_t ucode;
  ustate_t    next;
  logic       dec_hit;
  ustate_t    dec_target;

  op_decoder u_dec (
    .ir     (ir),
    .hit    (dec_hit),
    .target (dec_target)
  );

  assign ucode = microcode(state);
  assign cw    = halt ? CW_NOP : ucode;

  always_comb begin
    if (halt || ucode.halt)               next = state;
    else if (ucode.until_mfc && !mfc)     next = state;
    else if (ucode.jump)                  next = ucode.jump_target;
    else if (ucode.jump_op && dec_hit)    next = dec_target;
    else                                  next = ustate_t'(state + 5'd1);
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      state <= U_START;
      halt  <= 1'b0;
    end else begin
      state <= next;
      if (ucode.halt) halt <= 1'b1;
    end
  end
endmodule
