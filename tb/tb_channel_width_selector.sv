// tb_channel_width_selector: checks T = 50 kc / W for W = 10*tens + units.
// The 50 kc tick is driven every other clock; for each switch setting the
// number of ticks between T pulses must equal W, for W from 1 to 100.
module tb_channel_width_selector;
  logic clk = 0, rst = 1, tick50k = 0;
  logic [3:0] width_tens = 0, width_units = 1;
  logic t_pulse;
  int checks = 0, failures = 0;

  channel_width_selector dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) tick50k <= !tick50k;

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic try(input int tens, input int units);
    int w = tens * 10 + units;
    int n, first;
    width_tens = 4'(tens); width_units = 4'(units);
    rst = 1; @(posedge clk); #1 rst = 0;
    for (int rep = 0; rep < 3; rep++) begin
      n = 0;
      forever begin
        @(posedge clk);
        if (tick50k) n++;
        if (t_pulse) break;
      end
      checks++;
      if (!tick50k) begin failures++; $display("FAIL T without tick"); end
      if (n != w) begin failures++; $display("FAIL W=%0d: %0d ticks", w, n); end
    end
  endtask

  initial begin
    @(posedge clk);
    try(0, 1); try(0, 2); try(0, 10); try(1, 0); try(3, 7); try(9, 10); try(5, 5); try(9, 9);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
