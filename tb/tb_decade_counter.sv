// tb_decade_counter: checks the 1-2-2-4 decade counter.
// Counts 0..9 and wraps, checking the weighted value of the stages, the full
// flag and the carry pulse against a counter kept in the testbench; then
// checks the preset load and that load wins over a count pulse.
module tb_decade_counter;
  import rms_pkg::*;
  logic clk = 0, rst = 1, en = 0, load = 0;
  logic [3:0] load_value = 0;
  code1224_t q;
  logic full, carry;
  int checks = 0, failures = 0;
  int ref_v = 0;

  decade_counter dut (.*);

  always #5 clk = ~clk;

  function automatic int weight(input logic [3:0] s);
    return s[0] + 2 * s[1] + 2 * s[2] + 4 * s[3];
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    @(posedge clk); #1 rst = 0;
    check(weight(q) == 0, "reset value");
    for (int i = 0; i < 35; i++) begin
      en = ($urandom % 3) != 0;
      #1;
      check(full == (ref_v == 9), $sformatf("full at %0d", ref_v));
      check(carry == (en && ref_v == 9), $sformatf("carry at %0d", ref_v));
      @(posedge clk); #1;
      if (en) ref_v = (ref_v + 1) % 10;
      check(weight(q) == ref_v, $sformatf("value %0d got %0d", ref_v, weight(q)));
    end
    en = 0;
    for (int v = 0; v < 10; v++) begin
      load = 1; load_value = 4'(v); en = 1; #1;
      check(carry == 0, "no carry during load");
      @(posedge clk); #1;
      check(weight(q) == v, $sformatf("load %0d", v));
    end
    load = 0; en = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
