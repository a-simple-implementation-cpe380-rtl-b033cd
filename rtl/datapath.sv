// Single-bus datapath of the simple MIPS-subset processor.
//
// Registers IR, PC, MAR, MDR, Y and Z, a 32-entry register file and an ALU
// share one 32-bit bus. In each cycle the control word enables one source
// onto the bus (PC, MAR, MDR, Y, Z, the selected register, the sign-extended
// immediate of IR, the jump address, the shifted branch offset or a
// constant) and loads any number of registers from it at the clock edge. The
// ALU always computes op(Y, bus); Z keeps that result only when Zin is on.
// MDR is the memory side: it loads the bus on MDRin, or the memory's read
// data in a cycle where mfc is high. PC loads on PCin, or on PCinif0 when Z
// holds zero. MAR and MDR go to memory as address and write data.
//
// Bus-source formats: IRimmedout is IR[15:0] sign-extended; IRoffsetout is
// IR[15:0] sign-extended and shifted left by 2; IRaddout is {PC[31:26],
// IR[25:0]}, the 26-bit jump field with the top 6 bits of PC, as the course
// defines it. The AND-OR bus model (see system_bus) and the reset of all
// registers to zero are this design's own.
//
// Interface: cw from control_unit; ir, pc, mar, mdr, z out; mfc and dread in.
// Timing: everything loads at the rising clock edge; reset is synchronous.
module datapath
  import mips_pkg::*;
(
  input  logic       clk,
  input  logic       reset,
  input  ctrl_word_t cw,
  input  logic       mfc,
  input  word_t      dread,
  output word_t      ir,
  output word_t      pc,
  output word_t      mar,
  output word_t      mdr,
  output word_t      z,
  output word_t      bus
);
  word_t y, alu_out, reg_rdata, mdr_d;
  word_t imm_sext;
  logic  bus_conflict;
  logic  pc_load, mdr_load;
  logic [NUM_BUS_SRC-1:0][WORD_W-1:0] src;
  logic [NUM_BUS_SRC-1:0]             en;
  word_t unused_qn [6];

  assign imm_sext = {{16{ir[15]}}, ir[15:0]};

  always_comb begin
    src = '0;
    src[SRC_PC]       = pc;
    src[SRC_MAR]      = mar;
    src[SRC_MDR]      = mdr;
    src[SRC_Y]        = y;
    src[SRC_Z]        = z;
    src[SRC_REG]      = reg_rdata;
    src[SRC_IRIMMED]  = imm_sext;
    src[SRC_IRADDR]   = {pc[31:26], ir[25:0]};
    src[SRC_IROFFSET] = {imm_sext[29:0], 2'b00};
    src[SRC_CONST]    = cw.const_val;
    en = '0;
    en[SRC_PC]        = cw.pc_out;
    en[SRC_MAR]       = cw.mar_out;
    en[SRC_MDR]       = cw.mdr_out;
    en[SRC_Y]         = cw.y_out;
    en[SRC_Z]         = cw.z_out;
    en[SRC_REG]       = cw.reg_out;
    en[SRC_IRIMMED]   = cw.ir_immed_out;
    en[SRC_IRADDR]    = cw.ir_addr_out;
    en[SRC_IROFFSET]  = cw.ir_offset_out;
    en[SRC_CONST]     = cw.const_out;
  end

  system_bus #(.N(NUM_BUS_SRC), .W(WORD_W)) u_bus (
    .src      (src),
    .en       (en),
    .bus      (bus),
    .conflict (bus_conflict)
  );

  alu u_alu (
    .op     (cw.alu),
    .y      (y),
    .b      (bus),
    .result (alu_out)
  );

  reg_file u_regs (
    .clk   (clk),
    .reset (reset),
    .sel   (cw.sel),
    .ir    (ir),
    .we    (cw.reg_in),
    .wdata (bus),
    .rdata (reg_rdata)
  );

  assign pc_load  = cw.pc_in || (cw.pc_in_if0 && z == '0);
  assign mdr_load = cw.mdr_in || mfc;
  assign mdr_d    = cw.mdr_in ? bus : dread;

  dff_reg #(.W(WORD_W)) u_ir  (.clk(clk), .reset(reset), .en(cw.ir_in),  .d(bus),     .q(ir),  .q_n(unused_qn[0]));
  dff_reg #(.W(WORD_W)) u_pc  (.clk(clk), .reset(reset), .en(pc_load),   .d(bus),     .q(pc),  .q_n(unused_qn[1]));
  dff_reg #(.W(WORD_W)) u_mar (.clk(clk), .reset(reset), .en(cw.mar_in), .d(bus),     .q(mar), .q_n(unused_qn[2]));
  dff_reg #(.W(WORD_W)) u_mdr (.clk(clk), .reset(reset), .en(mdr_load),  .d(mdr_d),   .q(mdr), .q_n(unused_qn[3]));
  dff_reg #(.W(WORD_W)) u_y   (.clk(clk), .reset(reset), .en(cw.y_in),   .d(bus),     .q(y),   .q_n(unused_qn[4]));
  dff_reg #(.W(WORD_W)) u_z   (.clk(clk), .reset(reset), .en(cw.z_in),   .d(alu_out), .q(z),   .q_n(unused_qn[5]));

  // Only one tri-state driver may be on at a time.
  assert property (@(posedge clk) disable iff (reset) !bus_conflict)
    else $error("datapath: more than one bus driver enabled");
endmodule
