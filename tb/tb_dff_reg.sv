// Self-checking test of the D flip-flop register: load with enable, hold
// without it, synchronous clear, complement output.
module tb_dff_reg;
  logic clk = 0, reset, en;
  logic [7:0] d, q, q_n, model;
  int checks = 0, failures = 0;

  dff_reg #(.W(8)) dut (.clk(clk), .reset(reset), .en(en), .d(d), .q(q), .q_n(q_n));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    reset = 1; en = 0; d = 8'hA5; model = 0;
    @(posedge clk); #1;
    checks++; if (q !== 8'h00) begin failures++; $display("FAIL reset q=%h", q); end
    reset = 0;
    for (int k = 0; k < 500; k++) begin
      en = 1'($urandom); d = 8'($urandom); reset = ($urandom_range(0, 20) == 0);
      @(posedge clk);
      if (reset) model = 0; else if (en) model = d;
      #1;
      checks++;
      if (q !== model || q_n !== ~model) begin
        failures++; $display("FAIL k=%0d q=%h q_n=%h exp %h", k, q, q_n, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
