// The processor's single shared bus.
//
// In the drawn design every register drives the bus through a tri-state
// driver; at most one driver may be enabled in a cycle (two would short the
// bus). A high-impedance state does not exist in synthesizable two-state
// logic, so the bus here is an AND-OR of the sources: bus is the OR of every
// source whose enable is on. With one enable on this is exactly the value
// the tri-state bus carries; with none on the bus reads 0 (the floating value
// of the real bus is not defined). conflict flags two or more enables, the
// "short" case; the processor asserts that it never happens.
//
// Interface: src[i] is source i, en[i] its enable. Purely combinational.
module system_bus #(
  parameter int unsigned N = 10,
  parameter int unsigned W = 32
) (
  input  logic [N-1:0][W-1:0] src,
  input  logic [N-1:0]        en,
  output logic [W-1:0]        bus,
  output logic                conflict
);
  always_comb begin
    bus = '0;
    for (int i = 0; i < N; i++) begin
      if (en[i]) bus = bus | src[i];
    end
  end

  // Two or more bits set: clearing the lowest set bit leaves something.
  assign conflict = (en & (en - 1'b1)) != '0;
endmodule
