// Main memory with a strobe / read-not-write request and an MFC reply.
//
// A request is a one-cycle strobe with rnotw, addr and (for a write) dwrite.
// A write is done at the end of the strobe cycle: it takes exactly one clock
// and gives no reply. A read captures the addressed word into dread at the
// end of the strobe cycle and answers with mfc ("memory fetch complete"),
// high for one cycle, in the LATENCY-th cycle of the access counting the
// strobe cycle as the first; dread holds the word from then until the next
// read. With the default LATENCY = 2 mfc comes in the cycle right after the
// strobe. The strobe/MFC protocol, the two-cycle read and the one-cycle write
// are the course's; that the memory is clocked rather than triggered by the
// strobe's edge is this design's own choice. Only one read may be in flight:
// a strobe while a read is pending is a protocol error and is asserted
// against, and requests are ignored while reset is high. The storage is sram_array; ABITS/DBITS defaults are the course's
// parametric memory (256 words of 16 bits).
module memory #(
  parameter int unsigned ABITS   = 8,
  parameter int unsigned DBITS   = 16,
  parameter int unsigned LATENCY = 2
) (
  input  logic             clk,
  input  logic             reset,
  input  logic             strobe,
  input  logic             rnotw,
  input  logic [ABITS-1:0] addr,
  input  logic [DBITS-1:0] dwrite,
  output logic [DBITS-1:0] dread,
  output logic             mfc
);
  logic [DBITS-1:0] array_out;
  logic             pending;
  logic [7:0]       count;    // cycles left until mfc
  logic             req;      // strobe, ignored while reset is high

  sram_array #(.ABITS(ABITS), .DBITS(DBITS)) u_array (
    .clk    (clk),
    .addr   (addr),
    .rnotw  (rnotw),
    .strobe (req),
    .din    (dwrite),
    .dout   (array_out)
  );

  assign req = strobe && !reset;

  always_ff @(posedge clk) begin
    if (reset) begin
      pending <= 1'b0;
      count   <= '0;
      dread   <= '0;
    end else if (strobe && rnotw) begin
      pending <= 1'b1;
      count   <= 8'(LATENCY - 2);
      dread   <= array_out;
    end else if (pending) begin
      if (count == '0) pending <= 1'b0;
      else             count   <= count - 1'b1;
    end
  end

  assign mfc = pending && (count == '0);

  initial begin
    assert (LATENCY >= 2 && LATENCY <= 257)
      else $error("memory: LATENCY must be between 2 and 257");
  end

  // Handshake rule: no new request while a read is outstanding.
  assert property (@(posedge clk) disable iff (reset) strobe |-> !pending)
    else $error("memory: strobe while a read is pending");
endmodule
