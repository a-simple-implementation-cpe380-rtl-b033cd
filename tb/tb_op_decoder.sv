// Self-checking test of the opcode dispatch table: add, and, lw and sw with
// random fields reach their labels; other opcodes and functs miss.
module tb_op_decoder;
  import mips_pkg::*;
  import mips_asm_pkg::*;
  word_t ir;
  logic hit;
  ustate_t target;
  int checks = 0, failures = 0;

  op_decoder dut (.ir(ir), .hit(hit), .target(target));

  task automatic expect_label(word_t i, logic h, ustate_t t);
    ir = i; #1;
    checks++;
    if (hit !== h || (h && target !== t)) begin
      failures++; $display("FAIL ir=%h hit=%b target=%s exp %b %s", i, hit, target.name(), h, t.name());
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 500; k++) begin
      int a, b, c, imm, op;
      a = $urandom_range(0, 31); b = $urandom_range(0, 31); c = $urandom_range(0, 31);
      imm = $urandom_range(0, 65535);
      expect_label(asm_add(a, b, c), 1'b1, U_ADD);
      expect_label(asm_and(a, b, c), 1'b1, U_AND);
      expect_label(asm_lw(a, imm, b), 1'b1, U_LW);
      expect_label(asm_sw(a, imm, b), 1'b1, U_SW);
      // other R-type functs (sub 0x22, or 0x25, slt 0x2a) are not decoded
      expect_label({6'd0, 5'(a), 5'(b), 5'(c), 5'd0, 6'h22}, 1'b0, U_START);
      expect_label({6'd0, 5'(a), 5'(b), 5'(c), 5'd0, 6'h25}, 1'b0, U_START);
      // I-type opcodes other than 0x23 and 0x2b
      do op = $urandom_range(1, 63); while (op == 'h23 || op == 'h2b);
      expect_label({6'(op), 26'($urandom)}, 1'b0, U_START);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
