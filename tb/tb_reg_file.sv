// Self-checking test of the register file: writes through the rd, rt and rs
// fields, reads through each field, register 0 stays zero, reset clears.
module tb_reg_file;
  import mips_pkg::*;
  logic clk = 0, reset, we;
  reg_sel_t sel;
  word_t ir, wdata, rdata;
  word_t model [32];
  int checks = 0, failures = 0;

  reg_file dut (.clk(clk), .reset(reset), .sel(sel), .ir(ir), .we(we), .wdata(wdata), .rdata(rdata));

  always #5 clk = ~clk;

  function automatic int field_of(reg_sel_t s, word_t i);
    case (s)
      SEL_RS: return int'(i[25:21]);
      SEL_RT: return int'(i[20:16]);
      default: return int'(i[15:11]);
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
    reset = 1; we = 0; sel = SEL_RS; ir = '0; wdata = '0;
    for (int i = 0; i < 32; i++) model[i] = '0;
    @(posedge clk); #1;
    reset = 0;
    for (int k = 0; k < 3000; k++) begin
      sel = reg_sel_t'($urandom_range(0, 2));
      ir = $urandom;
      we = 1'($urandom);
      wdata = $urandom;
      #1;
      // combinational read of the selected register
      checks++;
      if (rdata !== model[field_of(sel, ir)]) begin
        failures++; $display("FAIL read sel=%s reg=%0d got %h exp %h", sel.name(), field_of(sel, ir), rdata, model[field_of(sel, ir)]);
      end
      @(posedge clk);
      if (we && field_of(sel, ir) != 0) model[field_of(sel, ir)] = wdata;
      #1;
    end
    // reset clears everything
    reset = 1; @(posedge clk); #1; reset = 0; we = 0;
    for (int r = 0; r < 32; r++) begin
      ir = {6'd0, 5'(r), 21'd0}; sel = SEL_RS; #1;
      checks++; if (rdata !== '0) begin failures++; $display("FAIL reset r%0d=%h", r, rdata); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
