// Self-checking test of the datapath driven by hand-made control words:
// every bus source, every register load, all ALU operations through Y and Z,
// the register file through the IR fields, PCinif0 with Z zero and non-zero,
// and MDR loading from memory on mfc.
module tb_datapath;
  import mips_pkg::*;
  import mips_asm_pkg::*;
  logic clk = 0, reset, mfc;
  ctrl_word_t cw;
  word_t dread, ir, pc, mar, mdr, z, bus;
  int checks = 0, failures = 0;

  datapath dut (.clk(clk), .reset(reset), .cw(cw), .mfc(mfc), .dread(dread),
                .ir(ir), .pc(pc), .mar(mar), .mdr(mdr), .z(z), .bus(bus));

  always #5 clk = ~clk;

  task automatic check(string what, word_t got, word_t exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h exp %h", what, got, exp); end
  endtask

  // apply one control word for one clock
  task automatic step(ctrl_word_t c);
    cw = c; #1;
    @(posedge clk); #1;
    cw = CW_NOP;
  endtask

  function automatic ctrl_word_t k(word_t v);   // CONST(v) on the bus
    ctrl_word_t c = CW_NOP;
    c.const_out = 1; c.const_val = v;
    return c;
  endfunction

  function automatic word_t alu_ref(alu_op_t o, word_t a, word_t b);
    case (o)
      ALU_ADD: return a + b;
      ALU_AND: return a & b;
      ALU_XOR: return a ^ b;
      ALU_OR:  return a | b;
      ALU_SL:  return b << a[4:0];
      ALU_SLT: return ($signed(a) < $signed(b)) ? 32'd1 : 32'd0;
      ALU_SRL: return b >> a[4:0];
      default: return a - b;
    endcase
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ctrl_word_t c;
    word_t a, b, instr;
    reset = 1; mfc = 0; dread = '0; cw = CW_NOP;
    repeat (2) @(posedge clk); #1;
    reset = 0;
    check("pc after reset", pc, 0);
    check("idle bus", bus, 0);

    // ALU through Y and Z, then Zout, Yout
    for (int n = 0; n < 200; n++) begin
      alu_op_t o;
      o = alu_op_t'($urandom_range(0, 7));
      a = $urandom; b = ($urandom_range(0, 2) == 0) ? word_t'($urandom_range(0, 33)) : $urandom;
      c = k(a); c.y_in = 1; step(c);
      c = k(b); c.alu = o; c.z_in = 1; step(c);
      check("z", z, alu_ref(o, a, b));
      c = CW_NOP; c.z_out = 1; cw = c; #1; check("Zout", bus, alu_ref(o, a, b));
      c = CW_NOP; c.y_out = 1; cw = c; #1; check("Yout", bus, a);
      cw = CW_NOP;
    end

    // IR load and the three IR bus formats
    for (int n = 0; n < 50; n++) begin
      instr = $urandom;
      c = k(instr); c.ir_in = 1; step(c);
      check("ir", ir, instr);
      c = k($urandom); c.pc_in = 1; step(c);
      c = CW_NOP; c.ir_immed_out = 1; cw = c; #1;
      check("IRimmedout", bus, {{16{instr[15]}}, instr[15:0]});
      c = CW_NOP; c.ir_offset_out = 1; cw = c; #1;
      check("IRoffsetout", bus, {{14{instr[15]}}, instr[15:0], 2'b00});
      c = CW_NOP; c.ir_addr_out = 1; cw = c; #1;
      check("IRaddout", bus, {pc[31:26], instr[25:0]});
      c = CW_NOP; c.pc_out = 1; cw = c; #1;
      check("PCout", bus, pc);
      cw = CW_NOP;
    end

    // register file: write r5 via rd, r9 via rt, read back via rs
    c = k(asm_add(5, 0, 9)); c.ir_in = 1; step(c);
    c = k(32'h1234_5678); c.sel = SEL_RD; c.reg_in = 1; step(c);
    c = k(32'hCAFE_F00D); c.sel = SEL_RT; c.reg_in = 1; step(c);
    c = k(asm_add(0, 5, 9)); c.ir_in = 1; step(c);
    c = CW_NOP; c.sel = SEL_RS; c.reg_out = 1; cw = c; #1; check("r5 via rs", bus, 32'h1234_5678);
    c = CW_NOP; c.sel = SEL_RT; c.reg_out = 1; cw = c; #1; check("r9 via rt", bus, 32'hCAFE_F00D);
    c = CW_NOP; c.sel = SEL_RD; c.reg_out = 1; cw = c; #1; check("r0 via rd", bus, 0);
    cw = CW_NOP;

    // MAR and MDR
    c = k(32'h0000_0040); c.mar_in = 1; step(c);
    check("mar", mar, 32'h40);
    c = CW_NOP; c.mar_out = 1; cw = c; #1; check("MARout", bus, 32'h40); cw = CW_NOP;
    c = k(32'hDEAD_BEEF); c.mdr_in = 1; step(c);
    check("mdr from bus", mdr, 32'hDEAD_BEEF);
    dread = 32'h0BAD_CAFE; mfc = 1; step(CW_NOP); mfc = 0; dread = $urandom;
    check("mdr from memory", mdr, 32'h0BAD_CAFE);
    step(CW_NOP);
    check("mdr holds", mdr, 32'h0BAD_CAFE);
    c = CW_NOP; c.mdr_out = 1; cw = c; #1; check("MDRout", bus, 32'h0BAD_CAFE); cw = CW_NOP;

    // PCinif0: Z nonzero -> no load; Z zero -> load
    c = k(32'd100); c.pc_in = 1; step(c);
    c = k(32'd7); c.y_in = 1; step(c);
    c = k(32'd3); c.alu = ALU_SUB; c.z_in = 1; step(c);     // Z = 4
    c = k(32'd200); c.pc_in_if0 = 1; step(c);
    check("PCinif0, Z!=0", pc, 100);
    c = k(32'd7); c.alu = ALU_SUB; c.z_in = 1; step(c);     // Z = 0
    c = k(32'd200); c.pc_in_if0 = 1; step(c);
    check("PCinif0, Z==0", pc, 200);

    // no load without the enable
    c = k(32'hFFFF_FFFF); step(c);
    check("pc holds", pc, 200);
    check("mar holds", mar, 32'h40);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
