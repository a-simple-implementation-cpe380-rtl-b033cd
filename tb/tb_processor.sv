// Self-checking test of the processor against the reference model: random
// add/and/lw/sw programs run on a behavioural memory with read latencies of
// 2, 3 and 6 clocks; the final memory (the program ends by storing its
// registers) and the clocks to halt must match the model.
module tb_processor;
  import mips_pkg::*;
  import mips_ref_pkg::*;
  logic clk = 0, reset, halt, mfc, rnotw, strobe;
  word_t dread, dwrite, addr;
  int latency;
  int checks = 0, failures = 0;

  processor dut (.clk(clk), .reset(reset), .halt(halt), .mfc(mfc), .dread(dread),
                 .dwrite(dwrite), .addr(addr), .rnotw(rnotw), .strobe(strobe));
  tb_mem_model mem (.clk(clk), .strobe(strobe), .rnotw(rnotw), .addr(addr), .dwrite(dwrite),
                    .latency(latency), .dread(dread), .mfc(mfc));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lats [3] = '{2, 3, 6};
    foreach (lats[li]) begin
      mips_ref ref_m;
      logic [31:0] prog [int];
      int exp_cycles, cyc;
      word_t got, exp;
      ref_m = new();
      prog.delete();
      latency = lats[li];
      make_program(prog, 120 + 40 * li);
      ref_m.mem = prog;
      mem.mem = prog;
      exp_cycles = ref_m.run(latency, 1000);
      reset = 1;
      repeat (2) @(posedge clk);
      #1 reset = 0;
      cyc = 0;
      while (!halt) begin @(posedge clk); #1; cyc++; end
      checks++;
      if (cyc != exp_cycles) begin failures++; $display("FAIL latency %0d: %0d clocks, expected %0d", latency, cyc, exp_cycles); end
      for (int w = 0; w <= (DUMP_BASE >> 2) + 8; w++) begin
        got = mem.mem.exists(w) ? mem.mem[w] : 32'd0;
        exp = ref_m.mem.exists(w) ? ref_m.mem[w] : 32'd0;
        checks++;
        if (got !== exp) begin failures++; $display("FAIL latency %0d: mem[%h] = %h, expected %h", latency, w * 4, got, exp); end
      end
      $display("latency %0d: %0d add, %0d and, %0d lw, %0d sw in %0d clocks", latency,
               ref_m.n_add, ref_m.n_and, ref_m.n_lw, ref_m.n_sw, cyc);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
