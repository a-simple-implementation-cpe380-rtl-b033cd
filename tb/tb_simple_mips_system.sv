// End-to-end test of the whole machine at its default size (1024-word
// memory, 2-clock reads). A random add/and/lw/sw program with a final
// illegal word is placed in memory; the run must halt after exactly the
// number of clocks the reference model predicts and leave the memory the
// model predicts (the program ends by storing its registers). The test also
// counts how often each mechanism of the design happened: waiting in an
// UNTILmfc state, dispatch to each instruction's states, memory reads and
// writes over the shared data wires, writes to register 0, and the halt on an
// illegal instruction; a mechanism that never happened is a failure.
module tb_simple_mips_system;
  import mips_pkg::*;
  import mips_ref_pkg::*;
  logic clk = 0, reset, halt;
  int checks = 0, failures = 0;
  int n_wait = 0, n_reads = 0, n_writes = 0, n_halt = 0;
  int n_dispatch [4] = '{0, 0, 0, 0};

  simple_mips_system dut (.clk(clk), .reset(reset), .halt(halt));

  always #5 clk = ~clk;

  // mechanism counters, from the machine's own signals
  always @(posedge clk) begin
    if (!reset && !halt) begin
      ustate_t s;
      s = dut.u_cpu.u_ctrl.state;
      if ((s == U_FETCH1 || s == U_LW3) && !dut.mfc) n_wait++;
      if (s == U_DISPATCH) begin
        case (dut.u_cpu.u_ctrl.next)
          U_ADD: n_dispatch[0]++;
          U_AND: n_dispatch[1]++;
          U_LW:  n_dispatch[2]++;
          U_SW:  n_dispatch[3]++;
          default: ;
        endcase
      end
      if (dut.strobe && dut.rnotw)  n_reads++;
      if (dut.strobe && !dut.rnotw) n_writes++;
      if (s == U_ILLEGAL) n_halt++;
    end
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_seen(string what, int n);
    checks++;
    if (n == 0) begin failures++; $display("FAIL mechanism never happened: %s", what); end
    else $display("  %-28s %0d", what, n);
  endtask

  initial begin
    mips_ref ref_m;
    logic [31:0] prog [int];
    int exp_cycles, cyc;
    word_t got, exp;
    ref_m = new();
    make_program(prog, 300);
    ref_m.mem = prog;
    exp_cycles = ref_m.run(2, 2000);
    for (int w = 0; w < 1024; w++) dut.u_mem.u_array.mem[w] = prog.exists(w) ? prog[w] : 32'd0;
    reset = 1;
    repeat (3) @(posedge clk);
    #1 reset = 0;
    cyc = 0;
    while (!halt) begin @(posedge clk); #1; cyc++; end
    checks++;
    if (cyc != exp_cycles) begin failures++; $display("FAIL %0d clocks to halt, expected %0d", cyc, exp_cycles); end
    for (int w = 0; w < 1024; w++) begin
      got = dut.u_mem.u_array.mem[w];
      exp = ref_m.mem.exists(w) ? ref_m.mem[w] : 32'd0;
      checks++;
      if (got !== exp) begin failures++; $display("FAIL mem[%h] = %h, expected %h", w * 4, got, exp); end
    end
    // halt holds
    repeat (5) @(posedge clk);
    #1 checks++;
    if (!halt) begin failures++; $display("FAIL halt dropped"); end
    $display("%0d instructions (%0d add, %0d and, %0d lw, %0d sw) in %0d clocks",
             ref_m.n_add + ref_m.n_and + ref_m.n_lw + ref_m.n_sw + 1,
             ref_m.n_add, ref_m.n_and, ref_m.n_lw, ref_m.n_sw, cyc);
    expect_seen("UNTILmfc wait cycles", n_wait);
    expect_seen("dispatch to Add", n_dispatch[0]);
    expect_seen("dispatch to And", n_dispatch[1]);
    expect_seen("dispatch to Lw", n_dispatch[2]);
    expect_seen("dispatch to Sw", n_dispatch[3]);
    expect_seen("memory reads", n_reads);
    expect_seen("memory writes", n_writes);
    expect_seen("writes aimed at register 0", ref_m.n_r0_writes);
    expect_seen("illegal-instruction halt", n_halt);
    checks++;
    if (n_reads != 1 + ref_m.n_add + ref_m.n_and + ref_m.n_lw + ref_m.n_sw + ref_m.n_lw) begin
      failures++; $display("FAIL %0d memory reads", n_reads);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
