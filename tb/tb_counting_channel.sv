// tb_counting_channel: checks a chain of decades against a binary count.
// Uses three decades so that the wrap past 999 is reached; pulses come at
// random, and every decade is decoded from its 1-2-2-4 weights.
module tb_counting_channel;
  import rms_pkg::*;
  localparam int D = 3;
  logic clk = 0, rst = 1, en = 0;
  code1224_t [D-1:0] digits;
  int checks = 0, failures = 0;
  int ref_v = 0;

  counting_channel #(.DIGITS(D)) dut (.*);

  always #5 clk = ~clk;

  function automatic int value(input code1224_t [D-1:0] d);
    int v = 0;
    for (int i = D - 1; i >= 0; i--)
      v = v * 10 + d[i][0] + 2 * d[i][1] + 2 * d[i][2] + 4 * d[i][3];
    return v;
  endfunction

  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    @(posedge clk); #1 rst = 0;
    for (int i = 0; i < 2400; i++) begin
      en = ($urandom % 4) != 0;
      @(posedge clk); #1;
      if (en) ref_v = (ref_v + 1) % 1000;
      if (i % 7 == 0 || ref_v < 3 || ref_v % 100 == 0) begin
        checks++;
        if (value(digits) != ref_v) begin
          failures++; $display("FAIL expected %0d got %0d", ref_v, value(digits));
        end
      end
    end
    en = 0;
    rst = 1; @(posedge clk); #1 rst = 0;
    checks++; if (value(digits) != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
