// tb_timing_pulse_source: checks the tick period, CLK_HZ / BASE_HZ clocks.
module tb_timing_pulse_source;
  localparam int unsigned CLK_HZ = 500_000;   // 10 clocks per 50 kc tick
  logic clk = 0, rst = 1, tick;
  int checks = 0, failures = 0;
  int last = -1, cyc = 0;

  timing_pulse_source #(.CLK_HZ(CLK_HZ), .BASE_HZ(50_000)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    @(posedge clk); #1 rst = 0;
    repeat (300) begin
      @(posedge clk); cyc++;
      if (tick) begin
        checks++;
        if (last < 0) begin
          if (cyc != 10) begin failures++; $display("FAIL first tick at %0d", cyc); end
        end else if (cyc - last != 10) begin
          failures++; $display("FAIL period %0d", cyc - last);
        end
        last = cyc;
      end
    end
    checks++; if (last < 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
