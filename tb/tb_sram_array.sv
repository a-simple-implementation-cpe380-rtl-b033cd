// Self-checking test of the storage array: random writes and reads against a
// reference array; a write needs both strobe and Read/~Write low.
module tb_sram_array;
  localparam int AB = 6, DB = 16;
  logic clk = 0, rnotw, strobe;
  logic [AB-1:0] addr;
  logic [DB-1:0] din, dout;
  logic [DB-1:0] model [1 << AB];
  int checks = 0, failures = 0;

  sram_array #(.ABITS(AB), .DBITS(DB)) dut (.clk(clk), .addr(addr), .rnotw(rnotw), .strobe(strobe), .din(din), .dout(dout));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // fill every word
    strobe = 1; rnotw = 0;
    for (int a = 0; a < (1 << AB); a++) begin
      addr = AB'(a); din = DB'($urandom); model[a] = din;
      @(posedge clk); #1;
    end
    for (int k = 0; k < 3000; k++) begin
      addr = AB'($urandom); din = DB'($urandom);
      strobe = 1'($urandom); rnotw = 1'($urandom);
      #1;
      checks++;
      if (dout !== model[addr]) begin failures++; $display("FAIL read a=%0d got %h exp %h", addr, dout, model[addr]); end
      @(posedge clk);
      if (strobe && !rnotw) model[addr] = din;
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
