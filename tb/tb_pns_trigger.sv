// tb_pns_trigger: each fire gives one trigger pulse of PULSE_CYCLES clocks.
module tb_pns_trigger;
  localparam int P = 4;
  logic clk = 0, rst = 1, fire = 0, trigger;
  int checks = 0, failures = 0;

  pns_trigger #(.PULSE_CYCLES(P)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    @(posedge clk); #1 rst = 0;
    checks++; if (trigger) failures++;
    for (int i = 0; i < 10; i++) begin
      int w;
      w = 0;
      fire = 1; @(posedge clk); #1 fire = 0;
      while (trigger) begin w++; @(posedge clk); #1; end
      checks++;
      if (w != P) begin failures++; $display("FAIL width %0d", w); end
      repeat ($urandom % 5) @(posedge clk);
      #1;
      checks++; if (trigger) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
