// tb_decade_counter_chassis: checks the eleven channels of the chassis.
// Random pulses go to random channels and each channel is compared with a
// count kept here; then channel 7 (five decades) and channel 1 (six
// decades) are driven past 100000 to check the number of decades fitted.
module tb_decade_counter_chassis;
  import rms_pkg::*;
  logic clk = 0, rst = 1;
  logic [NUM_CHANNELS-1:0] gated = '0;
  chassis_counts_t counts;
  int checks = 0, failures = 0;
  int ref_v[NUM_CHANNELS];

  decade_counter_chassis dut (.*);

  always #5 clk = ~clk;

  function automatic int value(input channel_digits_t d);
    int v = 0;
    for (int i = MAX_DECADES - 1; i >= 0; i--)
      v = v * 10 + d[i][0] + 2 * d[i][1] + 2 * d[i][2] + 4 * d[i][3];
    return v;
  endfunction

  task automatic check_all(input string when);
    for (int k = 0; k < NUM_CHANNELS; k++) begin
      checks++;
      if (value(counts[k]) != ref_v[k]) begin
        failures++; $display("FAIL %s ch%0d expected %0d got %0d", when, k, ref_v[k], value(counts[k]));
      end
    end
  endtask

  initial begin
    repeat (300000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    foreach (ref_v[k]) ref_v[k] = 0;
    @(posedge clk); #1 rst = 0;
    for (int i = 0; i < 3000; i++) begin
      gated = '0;
      gated[$urandom % NUM_CHANNELS] = ($urandom % 2) == 1;
      @(posedge clk); #1;
      for (int k = 0; k < NUM_CHANNELS; k++) if (gated[k]) ref_v[k]++;
    end
    gated = '0;
    check_all("random");
    // five decades on channel 7, six on channel 1
    gated = '0; gated[7] = 1; gated[1] = 1;
    for (int i = 0; i < 100000; i++) begin
      @(posedge clk);
      ref_v[7]++; ref_v[1]++;
    end
    #1 gated = '0;
    ref_v[7] = ref_v[7] % 100000;
    check_all("long");
    checks++;
    if (counts[7][5] != '0) begin failures++; $display("FAIL ch7 sixth decade"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
