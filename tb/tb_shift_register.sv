// tb_shift_register: one stage ON, advancing one per shift, wrap from F11.
module tb_shift_register;
  logic clk = 0, rst = 1, shift = 0;
  logic [10:0] f;
  logic wrap;
  int checks = 0, failures = 0;
  int pos = 0, wraps = 0;

  shift_register #(.STAGES(11)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    @(posedge clk); #1 rst = 0;
    for (int i = 0; i < 200; i++) begin
      shift = ($urandom % 2) == 1;
      #1;
      checks++;
      if (wrap != (shift && pos == 10)) begin failures++; $display("FAIL wrap at %0d", pos); end
      if (wrap) wraps++;
      @(posedge clk); #1;
      if (shift) pos = (pos + 1) % 11;
      checks++;
      if (f != 11'(1 << pos)) begin failures++; $display("FAIL f=%b pos=%0d", f, pos); end
    end
    shift = 0;
    checks++; if (wraps == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
