// tb_rep_rate_oscillator: checks one rep pulse per `period` 50 kc ticks.
module tb_rep_rate_oscillator;
  logic clk = 0, rst = 1, tick50k = 0;
  logic [15:0] period = 5;
  logic rep_pulse;
  int checks = 0, failures = 0;

  rep_rate_oscillator #(.PERIOD_W(16)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) tick50k <= ($urandom % 3) == 0;

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic try(input int p);
    int n;
    period = 16'(p);
    rst = 1; @(posedge clk); #1 rst = 0;
    for (int rep = 0; rep < 4; rep++) begin
      n = 0;
      forever begin
        @(posedge clk);
        if (tick50k) n++;
        if (rep_pulse) break;
      end
      checks++;
      if (n != p) begin failures++; $display("FAIL period %0d: %0d", p, n); end
    end
  endtask

  initial begin
    @(posedge clk);
    try(5); try(1); try(17); try(500);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
