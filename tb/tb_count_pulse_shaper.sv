// tb_count_pulse_shaper: one count pulse per detector pulse, 2 clocks later.
// Detector pulses of random width and spacing (at least one clock each)
// are sent; each must give exactly one one-clock pulse two clocks after
// its rising edge.
module tb_count_pulse_shaper;
  logic clk = 0, rst = 1, count_in = 0, count_pulse;
  int checks = 0, failures = 0;
  int sent = 0, got = 0, cyc = 0;
  int rise_q[$];

  count_pulse_shaper dut (.*);

  always #5 clk = ~clk;

  always @(posedge clk) begin
    cyc++;
    if (!rst && count_pulse) begin
      got++;
      checks++;
      if (rise_q.size() == 0) begin failures++; $display("FAIL spurious pulse"); end
      else begin
        int r;
        r = rise_q.pop_front();
        if (cyc - r != 2) begin failures++; $display("FAIL latency %0d", cyc - r); end
      end
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    @(posedge clk); #1 rst = 0;
    repeat (3) @(posedge clk);
    for (int i = 0; i < 500; i++) begin
      #1 count_in = 1; sent++; rise_q.push_back(cyc + 1);
      repeat (1 + $urandom % 4) @(posedge clk);
      #1 count_in = 0;
      repeat (1 + $urandom % 4) @(posedge clk);
    end
    repeat (5) @(posedge clk);
    checks++;
    if (got != sent) begin failures++; $display("FAIL sent %0d got %0d", sent, got); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
