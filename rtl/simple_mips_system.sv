// A complete small computer: the single-bus MIPS-subset processor and its
// main memory, joined by the processor/memory interface.
//
// The interface has MFC (memory to processor), Read/~Write and Strobe
// (processor to memory), the address (MAR, processor to memory) and one set
// of bidirectional data wires: data_link lets the memory drive them during a
// read and the processor (MDR) during a write, and both sides read them.
// Memory is word-organised: the word index is MAR[MEM_ABITS+1:2], so byte
// addresses step by 4 as PC does; higher MAR bits are not decoded. The
// default memory of 1024 32-bit words is this design's own size; the read
// latency of 2 clocks and the one-clock write are the course's.
//
// Interface: clk, synchronous active-high reset, halt (high once the machine
// has executed a HALT state). The program is placed in memory before reset
// is released; PC starts at 0.
module simple_mips_system
  import mips_pkg::*;
#(
  parameter int unsigned MEM_ABITS   = 10,
  parameter int unsigned MEM_LATENCY = 2
) (
  input  logic clk,
  input  logic reset,
  output logic halt
);
  logic  mfc, rnotw, strobe;
  word_t addr, cpu_data, mem_data, data;

  processor u_cpu (
    .clk    (clk),
    .reset  (reset),
    .halt   (halt),
    .mfc    (mfc),
    .dread  (data),
    .dwrite (cpu_data),
    .addr   (addr),
    .rnotw  (rnotw),
    .strobe (strobe)
  );

  data_link #(.W(WORD_W)) u_link (
    .rnotw   (rnotw),
    .cpu_out (cpu_data),
    .mem_out (mem_data),
    .data    (data)
  );

  memory #(.ABITS(MEM_ABITS), .DBITS(WORD_W), .LATENCY(MEM_LATENCY)) u_mem (
    .clk    (clk),
    .reset  (reset),
    .strobe (strobe),
    .rnotw  (rnotw),
    .addr   (addr[MEM_ABITS+1:2]),
    .dwrite (data),
    .dread  (mem_data),
    .mfc    (mfc)
  );
endmodule
