// D flip-flop register with load enable and synchronous clear.
//
// The storage element of the processor: on a rising clock edge q takes d when
// en is high, keeps its value otherwise, and is cleared when reset is high
// (reset wins). q_n is the complement of q, the second output of the classic
// NAND-gate D flip-flop. W=1 is the single-bit flip-flop of the course; the
// width, the enable (a register's "in" control signal) and the reset are this
// design's additions so the processor registers IR, PC, MAR, MDR, Y and Z can
// be built from it.
//
// Timing: one clock edge from d/en to q.
module dff_reg #(
  parameter int unsigned W = 1
) (
  input  logic         clk,
  input  logic         reset,
  input  logic         en,
  input  logic [W-1:0] d,
  output logic [W-1:0] q,
  output logic [W-1:0] q_n
);
  always_ff @(posedge clk) begin
    if (reset)   q <= '0;
    else if (en) q <= d;
  end

  assign q_n = ~q;
endmodule
