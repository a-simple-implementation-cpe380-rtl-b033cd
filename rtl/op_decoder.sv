// Instruction decode for the JUMPop microcode dispatch.
//
// The decode table mips_pkg::DECODE holds "when mask match label" entries.
// The first entry for which (IR & mask) == match wins: hit goes high and
// target is that entry's microcode state. With no match hit is low and
// target is don't-care (zero); the sequencer then falls through to the
// illegal-instruction state. The mechanism follows the course's control
// logic; the mask/match values are the standard MIPS encodings of add, and,
// lw and sw. Purely combinational.
module op_decoder
  import mips_pkg::*;
(
  input  word_t   ir,
  output logic    hit,
  output ustate_t target
);
  always_comb begin
    hit    = 1'b0;
    target = U_START;
    for (int i = NUM_DECODE - 1; i >= 0; i--) begin
      if ((ir & DECODE[i].mask) == DECODE[i].match) begin
        hit    = 1'b1;
        target = DECODE[i].label;
      end
    end
  end
endmodule
