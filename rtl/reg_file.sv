// MIPS general-purpose register file with a single bus port.
//
// The processor has one bus, so the register file has one port used either to
// read (REGout) or to write (REGin). Which register is used is chosen by the
// sel input: the rs (IR[25:21]), rt (IR[20:16]) or rd (IR[15:11]) field of
// the instruction register, as the control signals SELrs, SELrt and SELrd do.
// rdata is the selected register, combinationally; a write with we happens at
// the rising clock edge. Register 0 always reads zero and ignores writes, as
// in MIPS; this and the clear on reset are this design's own choices.
module reg_file
  import mips_pkg::*;
#(
  parameter int unsigned NREGS = 32
) (
  input  logic     clk,
  input  logic     reset,
  input  reg_sel_t sel,
  input  word_t    ir,
  input  logic     we,
  input  word_t    wdata,
  output word_t    rdata
);
  localparam int unsigned RW = $clog2(NREGS);

  word_t         regs [NREGS];
  logic [4:0]    field;
  logic [RW-1:0] idx;

  always_comb begin
    unique case (sel)
      SEL_RS:  field = ir_rs(ir);
      SEL_RT:  field = ir_rt(ir);
      SEL_RD:  field = ir_rd(ir);
      default: field = ir_rd(ir);
    endcase
  end
  assign idx = field[RW-1:0];

  always_ff @(posedge clk) begin
    if (reset) begin
      for (int i = 0; i < NREGS; i++) regs[i] <= '0;
    end else if (we && idx != '0) begin
      regs[idx] <= wdata;
    end
  end

  assign rdata = (idx == '0) ? '0 : regs[idx];
endmodule
