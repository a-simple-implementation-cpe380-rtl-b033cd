// Self-checking test of the bidirectional data link: memory drives on a
// read, processor drives on a write.
module tb_data_link;
  logic rnotw;
  logic [31:0] cpu_out, mem_out, data;
  int checks = 0, failures = 0;

  data_link #(.W(32)) dut (.rnotw(rnotw), .cpu_out(cpu_out), .mem_out(mem_out), .data(data));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 500; k++) begin
      rnotw = 1'($urandom); cpu_out = $urandom; mem_out = $urandom;
      #1;
      checks++;
      if (data !== (rnotw ? mem_out : cpu_out)) begin
        failures++; $display("FAIL rnotw=%b data=%h", rnotw, data);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
