// Self-checking test of the main memory: writes take one strobe cycle, reads
// answer with mfc in the LATENCY-th cycle (strobe cycle counted as the first)
// with the right word on dread. Runs the default 2-cycle memory and a 5-cycle
// one side by side, and a 64K x 8 memory with the 2-cycle timing.
module tb_memory;
  localparam int AB = 8, DB = 16;
  logic clk = 0, reset;
  logic strobe, rnotw;
  logic [AB-1:0] addr;
  logic [DB-1:0] dwrite, dread2, dread5;
  logic [7:0] dread_big;
  logic mfc2, mfc5, mfc_big;
  logic [DB-1:0] model [1 << AB];
  int checks = 0, failures = 0;

  memory dut2 (.clk(clk), .reset(reset), .strobe(strobe), .rnotw(rnotw), .addr(addr),
               .dwrite(dwrite), .dread(dread2), .mfc(mfc2));
  memory #(.ABITS(AB), .DBITS(DB), .LATENCY(5)) dut5 (.clk(clk), .reset(reset), .strobe(strobe), .rnotw(rnotw),
               .addr(addr), .dwrite(dwrite), .dread(dread5), .mfc(mfc5));

  // 65536 x 8 bits: the size of the course's first memory example
  memory #(.ABITS(16), .DBITS(8), .LATENCY(2)) dut_big (.clk(clk), .reset(reset), .strobe(strobe), .rnotw(rnotw),
               .addr({addr, 8'h5A}), .dwrite(dwrite[7:0]), .dread(dread_big), .mfc(mfc_big));

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic do_write(logic [AB-1:0] a, logic [DB-1:0] v);
    strobe = 1; rnotw = 0; addr = a; dwrite = v;
    @(posedge clk); #1;
    strobe = 0; dwrite = DB'($urandom); addr = AB'($urandom);
    model[a] = v;
    checks++;
    if (mfc2 || mfc5) begin failures++; $display("FAIL mfc after a write"); end
  endtask

  // Read on both memories; the cycle in which each mfc shows is counted.
  task automatic do_read(logic [AB-1:0] a);
    int cyc, seen2, seen5;
    strobe = 1; rnotw = 1; addr = a;
    @(posedge clk); #1;
    strobe = 0; addr = AB'($urandom); rnotw = 1'($urandom);
    seen2 = 0; seen5 = 0;
    for (cyc = 2; cyc <= 7; cyc++) begin
      if (mfc2) begin
        seen2++;
        checks++;
        if (cyc != 2) begin failures++; $display("FAIL mfc (latency 2) in cycle %0d", cyc); end
        checks++;
        if (dread2 !== model[a]) begin failures++; $display("FAIL dread2 %h exp %h", dread2, model[a]); end
        checks++;
        if (!mfc_big || dread_big !== model[a][7:0]) begin failures++; $display("FAIL 64Kx8 memory %b %h", mfc_big, dread_big); end
      end
      if (mfc5) begin
        seen5++;
        checks++;
        if (cyc != 5) begin failures++; $display("FAIL mfc (latency 5) in cycle %0d", cyc); end
        checks++;
        if (dread5 !== model[a]) begin failures++; $display("FAIL dread5 %h exp %h", dread5, model[a]); end
      end
      @(posedge clk); #1;
    end
    checks++;
    if (seen2 != 1 || seen5 != 1) begin failures++; $display("FAIL mfc pulses %0d %0d", seen2, seen5); end
  endtask

  initial begin
    reset = 1; strobe = 0; rnotw = 1; addr = '0; dwrite = '0;
    repeat (2) @(posedge clk); #1;
    reset = 0;
    for (int a = 0; a < (1 << AB); a++) do_write(AB'(a), DB'($urandom));
    for (int k = 0; k < 300; k++) begin
      if ($urandom_range(0, 1) == 0) do_write(AB'($urandom), DB'($urandom));
      else do_read(AB'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
