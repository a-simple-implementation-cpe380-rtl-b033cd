// Bidirectional data connection between processor and memory.
//
// One set of data wires carries data both ways. Read/~Write decides who
// drives them: during a read (rnotw = 1) the memory's output driver is on and
// the processor's is off; during a write (rnotw = 0) the processor drives
// (its driver is enabled through an inverter on Read/~Write). Both sides
// read the same wires as their DataIn. The pair of tri-state drivers is built
// here as a two-way selection, which gives the wire value of the drawn
// circuit without high-impedance states.
//
// Interface: cpu_out and mem_out are the two sides' DataOut, data is the
// shared wire, seen by both sides' DataIn. Purely combinational.
module data_link #(
  parameter int unsigned W = 32
) (
  input  logic         rnotw,
  input  logic [W-1:0] cpu_out,
  input  logic [W-1:0] mem_out,
  output logic [W-1:0] data
);
  assign data = rnotw ? mem_out : cpu_out;
endmodule
