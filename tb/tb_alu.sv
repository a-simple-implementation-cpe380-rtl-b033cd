// Self-checking test of the ALU: fixed corner cases and random operands for
// all eight operations, compared with a reference written bit by bit.
module tb_alu;
  import mips_pkg::*;
  alu_op_t op;
  word_t y, b, result;
  int checks = 0, failures = 0;

  alu dut (.op(op), .y(y), .b(b), .result(result));

  function automatic word_t ref_model(alu_op_t o, word_t a, word_t c);
    word_t r;
    logic lt;
    case (o)
      ALU_ADD: r = a + c;
      ALU_AND: for (int i = 0; i < 32; i++) r[i] = a[i] & c[i];
      ALU_XOR: for (int i = 0; i < 32; i++) r[i] = a[i] ^ c[i];
      ALU_OR:  for (int i = 0; i < 32; i++) r[i] = a[i] | c[i];
      ALU_SL:  begin r = c; for (int i = 0; i < int'(a[4:0]); i++) r = {r[30:0], 1'b0}; end
      ALU_SRL: begin r = c; for (int i = 0; i < int'(a[4:0]); i++) r = {1'b0, r[31:1]}; end
      ALU_SUB: r = a + ~c + 32'd1;
      ALU_SLT: begin
        // signed compare from sign bits and the difference
        if (a[31] != c[31]) lt = a[31];
        else begin r = a - c; lt = r[31]; end
        r = {31'd0, lt};
      end
      default: r = '0;
    endcase
    return r;
  endfunction

  task automatic check(alu_op_t o, word_t a, word_t c);
    word_t exp;
    op = o; y = a; b = c;
    #1;
    exp = ref_model(o, a, c);
    checks++;
    if (result !== exp) begin
      failures++;
      $display("FAIL op=%s y=%h b=%h got %h exp %h", o.name(), a, c, result, exp);
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
    // corner cases
    check(ALU_ADD, 32'hFFFF_FFFF, 32'd1);
    check(ALU_SUB, 32'd5, 32'd7);
    check(ALU_SLT, 32'hFFFF_FFFF, 32'd0);   // -1 < 0
    check(ALU_SLT, 32'd0, 32'hFFFF_FFFF);   // 0 < -1 false
    check(ALU_SLT, 32'h7FFF_FFFF, 32'h8000_0000);
    check(ALU_SL,  32'd4, 32'h0000_0001);
    check(ALU_SL,  32'd36, 32'h0000_0001);  // only Y[4:0] counts
    check(ALU_SRL, 32'd31, 32'h8000_0000);
    check(ALU_XOR, 32'hF0F0_F0F0, 32'hFF00_FF00);
    check(ALU_OR,  32'hF0F0_F0F0, 32'h0F0F_0000);
    check(ALU_AND, 32'hF0F0_F0F0, 32'hFF00_FF00);
    for (int k = 0; k < 4000; k++) begin
      check(alu_op_t'($urandom_range(0, 7)), $urandom, ($urandom_range(0, 3) == 0) ? word_t'($urandom_range(0, 40)) : $urandom);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
