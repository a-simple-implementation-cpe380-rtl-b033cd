// Shared types and the microprogram of the single-bus MIPS-subset processor.
//
// The processor is steered by one control word per clock. Every field of
// ctrl_word_t is one named control signal: the "...out" bits are the
// tri-state enables of the bus sources, the "...in" bits load a register at
// the end of the cycle, alu selects the ALU operation, sel picks the rs, rt or
// rd field of IR for the register file, and the remaining bits steer the
// sequencer (jump, jump_op, until_mfc, halt). The set of signals and their
// meaning follow the course's control-signal table; the bit layout, the
// operation encoding and the state numbering are this design's own.
//
// The microprogram (function microcode) holds the fetch sequence and the
// state sequences of add, and, lw and sw, one state per line. A state
// without a jump continues with the next state number. The dispatch table
// (DECODE) holds "when mask match label" entries: in a jump_op state the
// first entry with (IR & mask) == match names the next state; with no match
// the sequencer falls through to the state after the dispatch state, which
// halts the machine (illegal instruction). Mask/match values are the
// standard MIPS encodings.
package mips_pkg;

  localparam int unsigned WORD_W = 32;
  typedef logic [WORD_W-1:0] word_t;

  // ALU operations (ALUadd ... ALUsub). Encoding is this design's own.
  typedef enum logic [2:0] {
    ALU_ADD = 3'd0,  // y + bus
    ALU_AND = 3'd1,  // y & bus
    ALU_XOR = 3'd2,  // y ^ bus
    ALU_OR  = 3'd3,  // y | bus
    ALU_SL  = 3'd4,  // bus << y
    ALU_SLT = 3'd5,  // (y < bus), signed
    ALU_SRL = 3'd6,  // bus >> y
    ALU_SUB = 3'd7   // y - bus
  } alu_op_t;

  // Register-file field select (SELrs, SELrt, SELrd).
  typedef enum logic [1:0] {
    SEL_RS = 2'd0,
    SEL_RT = 2'd1,
    SEL_RD = 2'd2
  } reg_sel_t;

  // Bus sources, one tri-state enable each.
  typedef enum int unsigned {
    SRC_PC       = 0,
    SRC_MAR      = 1,
    SRC_MDR      = 2,
    SRC_Y        = 3,
    SRC_Z        = 4,
    SRC_REG      = 5,
    SRC_IRIMMED  = 6,
    SRC_IRADDR   = 7,
    SRC_IROFFSET = 8,
    SRC_CONST    = 9
  } bus_src_t;
  localparam int unsigned NUM_BUS_SRC = 10;

  // Microcode state numbers. Names of the first state of a sequence are the
  // labels used by JUMP and by the dispatch table.
  typedef enum logic [4:0] {
    U_START    = 5'd0,   // PCout, MARin, MEMread, Yin
    U_FETCH1   = 5'd1,   // CONST(4), ALUadd, Zin, UNTILmfc
    U_FETCH2   = 5'd2,   // MDRout, IRin
    U_DISPATCH = 5'd3,   // JUMPop, Zout, PCin
    U_ILLEGAL  = 5'd4,   // HALT
    U_ADD      = 5'd5,   // SELrs, REGout, Yin
    U_ADD1     = 5'd6,   // SELrt, REGout, ALUadd, Zin
    U_ADD2     = 5'd7,   // Zout, SELrd, REGin, JUMP(Start)
    U_AND      = 5'd8,   // SELrs, REGout, Yin
    U_AND1     = 5'd9,   // SELrt, REGout, ALUand, Zin
    U_AND2     = 5'd10,  // Zout, SELrd, REGin, JUMP(Start)
    U_LW       = 5'd11,  // SELrs, REGout, Yin
    U_LW1      = 5'd12,  // IRimmedout, ALUadd, Zin
    U_LW2      = 5'd13,  // Zout, MARin, MEMread
    U_LW3      = 5'd14,  // UNTILmfc
    U_LW4      = 5'd15,  // MDRout, SELrt, REGin, JUMP(Start)
    U_SW       = 5'd16,  // SELrt, REGout, MDRin
    U_SW1      = 5'd17,  // SELrs, REGout, Yin
    U_SW2      = 5'd18,  // IRimmedout, ALUadd, Zin
    U_SW3      = 5'd19   // Zout, MARin, MEMwrite, JUMP(Start)
  } ustate_t;

  typedef struct packed {
    // tri-state enables onto the bus
    logic     pc_out;
    logic     mar_out;
    logic     mdr_out;
    logic     y_out;
    logic     z_out;
    logic     reg_out;
    logic     ir_immed_out;
    logic     ir_addr_out;
    logic     ir_offset_out;
    logic     const_out;
    word_t    const_val;
    // register loads at the end of the cycle
    logic     ir_in;
    logic     pc_in;
    logic     pc_in_if0;
    logic     mar_in;
    logic     mdr_in;
    logic     y_in;
    logic     z_in;
    logic     reg_in;
    reg_sel_t sel;
    alu_op_t  alu;
    // memory requests
    logic     mem_read;
    logic     mem_write;
    // sequencing
    logic     until_mfc;
    logic     jump;
    ustate_t  jump_target;
    logic     jump_op;
    logic     halt;
  } ctrl_word_t;

  localparam ctrl_word_t CW_NOP = '0;

  // The microprogram: control word of each state.
  function automatic ctrl_word_t microcode(ustate_t s);
    ctrl_word_t c;
    c = CW_NOP;
    unique case (s)
      U_START:    begin c.pc_out = 1'b1; c.mar_in = 1'b1; c.mem_read = 1'b1; c.y_in = 1'b1; end
      U_FETCH1:   begin c.const_out = 1'b1; c.const_val = 32'd4; c.alu = ALU_ADD; c.z_in = 1'b1;
                        c.until_mfc = 1'b1; end
      U_FETCH2:   begin c.mdr_out = 1'b1; c.ir_in = 1'b1; end
      U_DISPATCH: begin c.jump_op = 1'b1; c.z_out = 1'b1; c.pc_in = 1'b1; end
      U_ILLEGAL:  begin c.halt = 1'b1; end
      U_ADD:      begin c.sel = SEL_RS; c.reg_out = 1'b1; c.y_in = 1'b1; end
      U_ADD1:     begin c.sel = SEL_RT; c.reg_out = 1'b1; c.alu = ALU_ADD; c.z_in = 1'b1; end
      U_ADD2:     begin c.z_out = 1'b1; c.sel = SEL_RD; c.reg_in = 1'b1;
                        c.jump = 1'b1; c.jump_target = U_START; end
      U_AND:      begin c.sel = SEL_RS; c.reg_out = 1'b1; c.y_in = 1'b1; end
      U_AND1:     begin c.sel = SEL_RT; c.reg_out = 1'b1; c.alu = ALU_AND; c.z_in = 1'b1; end
      U_AND2:     begin c.z_out = 1'b1; c.sel = SEL_RD; c.reg_in = 1'b1;
                        c.jump = 1'b1; c.jump_target = U_START; end
      U_LW:       begin c.sel = SEL_RS; c.reg_out = 1'b1; c.y_in = 1'b1; end
      U_LW1:      begin c.ir_immed_out = 1'b1; c.alu = ALU_ADD; c.z_in = 1'b1; end
      U_LW2:      begin c.z_out = 1'b1; c.mar_in = 1'b1; c.mem_read = 1'b1; end
      U_LW3:      begin c.until_mfc = 1'b1; end
      U_LW4:      begin c.mdr_out = 1'b1; c.sel = SEL_RT; c.reg_in = 1'b1;
                        c.jump = 1'b1; c.jump_target = U_START; end
      U_SW:       begin c.sel = SEL_RT; c.reg_out = 1'b1; c.mdr_in = 1'b1; end
      U_SW1:      begin c.sel = SEL_RS; c.reg_out = 1'b1; c.y_in = 1'b1; end
      U_SW2:      begin c.ir_immed_out = 1'b1; c.alu = ALU_ADD; c.z_in = 1'b1; end
      U_SW3:      begin c.z_out = 1'b1; c.mar_in = 1'b1; c.mem_write = 1'b1;
                        c.jump = 1'b1; c.jump_target = U_START; end
      default:    begin c.halt = 1'b1; end  // unused state numbers stop the machine
    endcase
    return c;
  endfunction

  // Instruction decode: "when mask match label".
  typedef struct packed {
    word_t   mask;
    word_t   match;
    ustate_t label;
  } decode_entry_t;

  localparam int unsigned NUM_DECODE = 4;
  localparam decode_entry_t DECODE [NUM_DECODE] = '{
    '{mask: 32'hFC00_07FF, match: 32'h0000_0020, label: U_ADD},  // add: op 0, funct 0x20
    '{mask: 32'hFC00_07FF, match: 32'h0000_0024, label: U_AND},  // and: op 0, funct 0x24
    '{mask: 32'hFC00_0000, match: 32'h8C00_0000, label: U_LW},   // lw:  op 0x23
    '{mask: 32'hFC00_0000, match: 32'hAC00_0000, label: U_SW}    // sw:  op 0x2b
  };

  // MIPS instruction fields.
  function automatic logic [4:0] ir_rs(word_t ir); return ir[25:21]; endfunction
  function automatic logic [4:0] ir_rt(word_t ir); return ir[20:16]; endfunction
  function automatic logic [4:0] ir_rd(word_t ir); return ir[15:11]; endfunction

endpackage
