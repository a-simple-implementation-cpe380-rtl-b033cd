// Reference model for the processor tests: an instruction-level model of
// add, and, lw and sw that also counts clocks with the timing of the
// microprogram (fetch = LAT + 3 clocks, add/and = 3 more, lw = LAT + 4 more,
// sw = 4 more, an illegal word = fetch + 1 clock before halt), and a random
// program generator whose loads and stores stay inside a data area.
package mips_ref_pkg;
  import mips_asm_pkg::*;

  localparam int CODE_LIMIT = 'h7F0;   // code below this byte address
  localparam int BASE_ADDR  = 'h7FC;   // word holding the base pointer
  localparam int DATA_BASE  = 'h800;   // data area 0x800 .. 0xBFC
  localparam int DUMP_BASE  = 'hC00;   // final registers are stored here

  class mips_ref;
    logic [31:0] mem [int];
    logic [31:0] regs [32];
    int          cycles;
    int          n_add, n_and, n_lw, n_sw, n_r0_writes;

    function new();
      foreach (regs[i]) regs[i] = '0;
    endfunction

    function logic [31:0] rd_mem(int byte_addr);
      if (mem.exists(byte_addr >> 2)) return mem[byte_addr >> 2];
      return '0;
    endfunction

    // Runs from address 0 until an illegal instruction; returns the clocks
    // from the first Start state to the clock edge that raises halt.
    function int run(int lat, int max_instr);
      int pc = 0;
      cycles = 0;
      for (int n = 0; n < max_instr; n++) begin
        logic [31:0] ir = rd_mem(pc);
        int rs = int'(ir[25:21]), rt = int'(ir[20:16]), rdn = int'(ir[15:11]);
        int ea = int'(regs[rs] + {{16{ir[15]}}, ir[15:0]});
        cycles += lat + 3;
        pc += 4;
        if (ir[31:26] == 6'd0 && ir[10:0] == 11'h020) begin
          if (rdn != 0) regs[rdn] = regs[rs] + regs[rt]; else n_r0_writes++;
          cycles += 3; n_add++;
        end else if (ir[31:26] == 6'd0 && ir[10:0] == 11'h024) begin
          if (rdn != 0) regs[rdn] = regs[rs] & regs[rt]; else n_r0_writes++;
          cycles += 3; n_and++;
        end else if (ir[31:26] == 6'h23) begin
          if (rt != 0) regs[rt] = rd_mem(ea); else n_r0_writes++;
          cycles += lat + 4; n_lw++;
        end else if (ir[31:26] == 6'h2b) begin
          mem[ea >> 2] = regs[rt];
          cycles += 4; n_sw++;
        end else begin
          cycles += 1;   // the HALT state
          return cycles;
        end
      end
      return -1;
    endfunction
  endclass

  // Fills m with a random program of n instructions (plus a first lw of the
  // base pointer into r8, stores of r1..r8 and a final illegal word) and random data.
  function automatic void make_program(ref logic [31:0] m [int], input int n);
    int a = 0;
    m[BASE_ADDR >> 2] = DATA_BASE;
    for (int w = DATA_BASE >> 2; w < (DATA_BASE >> 2) + 256; w++) m[w] = $urandom;
    m[a >> 2] = asm_lw(8, BASE_ADDR, 0); a += 4;
    for (int i = 0; i < n && a < CODE_LIMIT; i++) begin
      int d  = ($urandom_range(0, 15) == 0) ? 0 : $urandom_range(1, 7);
      int s  = $urandom_range(0, 8), t = $urandom_range(0, 8);
      int use_base = $urandom_range(0, 1);
      int off = $urandom_range(0, 255) * 4;
      int imm = use_base ? off : DATA_BASE + off;
      int base = use_base ? 8 : 0;
      case ($urandom_range(0, 3))
        0: m[a >> 2] = asm_add(d, s, t);
        1: m[a >> 2] = asm_and(d, s, t);
        2: m[a >> 2] = asm_lw(d, imm, base);
        default: m[a >> 2] = asm_sw(s, imm, base);
      endcase
      a += 4;
    end
    // dump r1..r8 to 0xC04.. so the final registers can be compared in memory
    for (int r = 1; r <= 8; r++) begin m[a >> 2] = asm_sw(r, DUMP_BASE + 4 * r, 0); a += 4; end
    m[a >> 2] = 32'hFFFF_FFFF;
  endfunction
endpackage
