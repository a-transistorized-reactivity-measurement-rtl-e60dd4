// tb_scanner: continuous scan of all channels and home; manual stepping.
// STEP_DIV is 3 ticks; the 50 kc tick is every clock. Each channel holds
// a distinct count so that the readout shows which channel is selected.
module tb_scanner;
  import rms_pkg::*;
  logic clk = 0, rst = 1, tick50k = 1, start = 0, manual = 0;
  chassis_counts_t counts;
  logic [3:0] position;
  channel_digits_t readout;
  logic step;
  int checks = 0, failures = 0;

  scanner #(.STEP_DIV(3)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic wait_step(output int clocks);
    clocks = 0;
    do begin @(posedge clk); clocks++; end while (!step);
    #1;
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int c;
    for (int k = 0; k < NUM_CHANNELS; k++)
      for (int i = 0; i < MAX_DECADES; i++) counts[k][i] = 4'($urandom);
    for (int k = 0; k < NUM_CHANNELS; k++) counts[k][0] = 4'(k);
    repeat (2) @(posedge clk); #1 rst = 0;
    repeat (10) @(posedge clk); #1;
    check(position == 0 && readout == '0, "rests at home");
    // continuous: one press, eleven channels, home
    start = 1;
    wait_step(c);
    start = 0;
    check(c == 3, $sformatf("step period %0d", c));
    for (int p = 1; p <= 11; p++) begin
      check(position == 4'(p), $sformatf("position %0d got %0d", p, position));
      check(readout == counts[p - 1], $sformatf("readout at %0d", p));
      if (p < 11) begin wait_step(c); check(c == 3, "period"); end
    end
    wait_step(c);
    check(position == 0, "returned home");
    repeat (20) @(posedge clk); #1;
    check(position == 0, "stays home");
    // manual: steps while START held, stays when released
    manual = 1;
    start = 1;
    wait_step(c); wait_step(c); wait_step(c);
    start = 0;
    check(position == 3, $sformatf("manual position %0d", position));
    repeat (20) @(posedge clk); #1;
    check(position == 3 && readout == counts[2], "manual holds");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
