// Behavioural memory for the processor test: same strobe / rnotw / mfc
// protocol as the main memory, with the read latency taken from an input so
// the test can vary it while running. Byte address, word storage.
module tb_mem_model (
  input  logic        clk,
  input  logic        strobe,
  input  logic        rnotw,
  input  logic [31:0] addr,
  input  logic [31:0] dwrite,
  input  int          latency,
  output logic [31:0] dread,
  output logic        mfc
);
  logic [31:0] mem [int];
  int          left = -1;
  int          reads = 0, writes = 0;

  always @(posedge clk) begin
    if (strobe && rnotw) begin
      dread <= mem.exists(int'(addr >> 2)) ? mem[int'(addr >> 2)] : 32'd0;
      left  <= latency - 2;
      reads <= reads + 1;
    end else begin
      if (strobe) begin
        mem[int'(addr >> 2)] = dwrite;
        writes <= writes + 1;
      end
      if (left >= 0) left <= left - 1;
    end
  end

  assign mfc = (left == 0);
endmodule
