// tb_operation_counter: done after exactly 10, 100 and 1000 cycle pulses.
module tb_operation_counter;
  import rms_pkg::*;
  logic clk = 0, rst = 1, cycle_end = 0;
  ops_sel_t ops_sel = OPS_10;
  code1224_t [2:0] count;
  logic done;
  int checks = 0, failures = 0;

  operation_counter #(.DIGITS(3)) dut (.*);

  always #5 clk = ~clk;

  function automatic int value(input code1224_t [2:0] d);
    int v = 0;
    for (int i = 2; i >= 0; i--) v = v * 10 + d[i][0] + 2 * d[i][1] + 2 * d[i][2] + 4 * d[i][3];
    return v;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic run(input ops_sel_t sel, input int n);
    ops_sel = sel;
    rst = 1; @(posedge clk); #1 rst = 0;
    for (int i = 1; i <= n; i++) begin
      cycle_end = 1; @(posedge clk); #1 cycle_end = 0;
      if (i == n - 1 || i == n / 2) begin
        checks++;
        if (done) begin failures++; $display("FAIL early done at %0d of %0d", i, n); end
        checks++;
        if (value(count) != i) begin failures++; $display("FAIL count %0d got %0d", i, value(count)); end
      end
      @(posedge clk); #1;
    end
    checks++;
    if (!done) begin failures++; $display("FAIL not done after %0d", n); end
  endtask

  initial begin
    @(posedge clk);
    run(OPS_10, 10); run(OPS_100, 100); run(OPS_1000, 1000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
