// Self-checking test of the microprogrammed control: for add, and, lw, sw and
// an illegal word, the state sequence, the wait on mfc, the control signals
// of key states and the clock count are compared with a hand-written trace.
module tb_control_unit;
  import mips_pkg::*;
  import mips_asm_pkg::*;
  logic clk = 0, reset, mfc;
  word_t ir;
  ctrl_word_t cw;
  ustate_t state;
  logic halt;
  int checks = 0, failures = 0;
  int mfc_wait;   // cycles the memory model waits before mfc in an UNTILmfc state
  int waited;

  control_unit dut (.clk(clk), .reset(reset), .ir(ir), .mfc(mfc), .cw(cw), .state(state), .halt(halt));

  always #5 clk = ~clk;

  // mfc comes after mfc_wait cycles spent in a waiting state
  always_comb mfc = (state == U_FETCH1 || state == U_LW3) && (waited >= mfc_wait);
  always_ff @(posedge clk) begin
    if (reset) waited <= 0;
    else if ((state == U_FETCH1 || state == U_LW3) && !mfc) waited <= waited + 1;
    else waited <= 0;
  end

  task automatic expect_state(ustate_t s);
    checks++;
    if (state !== s) begin failures++; $display("FAIL state %s exp %s", state.name(), s.name()); end
    @(posedge clk); #1;
  endtask

  // expected trace of the fetch; UNTILmfc state repeats mfc_wait times then once more
  task automatic expect_fetch(word_t instr);
    checks++;
    if (!(cw.pc_out && cw.mar_in && cw.mem_read && cw.y_in)) begin failures++; $display("FAIL Start signals"); end
    expect_state(U_START);
    for (int i = 0; i <= mfc_wait; i++) expect_state(U_FETCH1);
    ir = instr;   // IR loads at the end of the next state
    checks++;
    if (!(cw.mdr_out && cw.ir_in)) begin failures++; $display("FAIL fetch2 signals"); end
    expect_state(U_FETCH2);
    checks++;
    if (!(cw.jump_op && cw.z_out && cw.pc_in)) begin failures++; $display("FAIL dispatch signals"); end
    expect_state(U_DISPATCH);
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t0;
    reset = 1; ir = '0; mfc_wait = 1;
    repeat (2) @(posedge clk); #1;
    reset = 0;
    for (int w = 1; w <= 3; w++) begin
      mfc_wait = w;
      t0 = $time;
      expect_fetch(asm_add(3, 1, 2));
      expect_state(U_ADD); expect_state(U_ADD1);
      checks++; if (!(cw.z_out && cw.reg_in && cw.sel == SEL_RD)) begin failures++; $display("FAIL add2 signals"); end
      expect_state(U_ADD2);
      checks++; if (($time - t0) / 10 != 4 + w + 3) begin failures++; $display("FAIL add took %0d clocks", ($time - t0) / 10); end
      expect_fetch(asm_and(3, 1, 2));
      expect_state(U_AND); checks++; if (cw.alu != ALU_AND) begin failures++; $display("FAIL and op"); end
      expect_state(U_AND1); expect_state(U_AND2);
      t0 = $time;
      expect_fetch(asm_lw(4, 8, 1));
      expect_state(U_LW); expect_state(U_LW1);
      checks++; if (!(cw.mar_in && cw.mem_read)) begin failures++; $display("FAIL lw2 signals"); end
      expect_state(U_LW2);
      for (int i = 0; i <= w; i++) expect_state(U_LW3);
      expect_state(U_LW4);
      checks++; if (($time - t0) / 10 != (4 + w) + (5 + w)) begin failures++; $display("FAIL lw took %0d clocks", ($time - t0) / 10); end
      expect_fetch(asm_sw(4, 12, 1));
      expect_state(U_SW); expect_state(U_SW1); expect_state(U_SW2);
      checks++; if (!(cw.mem_write && cw.mar_in)) begin failures++; $display("FAIL sw3 signals"); end
      expect_state(U_SW3);
    end
    // illegal instruction: fall through to HALT, then stay halted
    expect_fetch(32'hFFFF_FFFF);
    checks++; if (halt) begin failures++; $display("FAIL halt too early"); end
    checks++; if (!cw.halt) begin failures++; $display("FAIL no HALT signal"); end
    expect_state(U_ILLEGAL);
    checks++; if (!halt) begin failures++; $display("FAIL halt not raised"); end
    repeat (3) expect_state(U_ILLEGAL);
    checks++; if (!halt || cw != CW_NOP) begin failures++; $display("FAIL halted machine not idle"); end
    // reset restarts
    reset = 1; @(posedge clk); #1; reset = 0;
    checks++; if (halt) begin failures++; $display("FAIL reset did not clear halt"); end
    expect_state(U_START);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
