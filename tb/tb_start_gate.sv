// tb_start_gate: START arms S, STOP and operation-counter done clear it,
// START is ignored while done, RESET clears it.
module tb_start_gate;
  logic clk = 0, rst = 1, start = 0, stop = 0, ops_done = 0, s;
  int checks = 0, failures = 0;

  start_gate dut (.*);

  always #5 clk = ~clk;

  task automatic step_check(input bit exp, input string what);
    @(posedge clk); #1;
    checks++;
    if (s !== exp) begin failures++; $display("FAIL %s: s=%0b", what, s); end
  endtask

  initial begin
    repeat (1000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    step_check(0, "reset");
    rst = 0;
    step_check(0, "idle");
    start = 1; step_check(1, "start"); start = 0;
    step_check(1, "held");
    stop = 1; step_check(0, "stop"); stop = 0;
    start = 1; stop = 1; step_check(0, "stop wins"); stop = 0;
    step_check(1, "start again"); start = 0;
    ops_done = 1; step_check(0, "done");
    start = 1; step_check(0, "start ignored when done"); start = 0;
    ops_done = 0; start = 1; step_check(1, "restart"); start = 0;
    rst = 1; step_check(0, "reset clears"); rst = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
