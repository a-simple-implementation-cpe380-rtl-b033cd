// Self-checking test of the shared bus: each single enable passes its source,
// no enable gives 0, two or more enables raise conflict.
module tb_system_bus;
  localparam int N = 10;
  logic [N-1:0][31:0] src;
  logic [N-1:0] en;
  logic [31:0] bus;
  logic conflict;
  int checks = 0, failures = 0;

  system_bus #(.N(N), .W(32)) dut (.src(src), .en(en), .bus(bus), .conflict(conflict));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 2000; k++) begin
      int pick, cnt;
      for (int i = 0; i < N; i++) src[i] = $urandom;
      case ($urandom_range(0, 3))
        0: en = '0;
        1, 2: begin pick = $urandom_range(0, N - 1); en = '0; en[pick] = 1'b1; end
        default: en = N'($urandom);
      endcase
      #1;
      cnt = 0;
      for (int i = 0; i < N; i++) if (en[i]) cnt++;
      checks++;
      if (conflict !== (cnt > 1)) begin failures++; $display("FAIL conflict en=%b", en); end
      if (cnt == 0) begin
        checks++; if (bus !== '0) begin failures++; $display("FAIL idle bus %h", bus); end
      end else if (cnt == 1) begin
        for (int i = 0; i < N; i++) if (en[i]) begin
          checks++; if (bus !== src[i]) begin failures++; $display("FAIL bus %h exp %h", bus, src[i]); end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
