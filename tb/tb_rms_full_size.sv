// tb_rms_full_size: one complete operation of the system at its default
// parameters: a 10 MHz master clock, the 50 kc timing base and a scanner
// stepping once per second. Channel width 200 us (W = 10), delay 2 widths,
// 10 cycles per second, 10 operations; then a continuous scan of all
// eleven channels and a manual step. A detector model sends background
// pulses plus a decaying burst after each trigger; the expected count of
// every counter is worked out from the logged pulse and trigger times and
// compared with the counters and the scanner readout.
module tb_rms_full_size;
  import rms_pkg::*;

  localparam int unsigned CLK_HZ   = 10_000_000;  // the top's default
  localparam int unsigned SCAN_DIV = 50_000;      // the top's default
  localparam int          TICK     = CLK_HZ / 50_000;

  logic clk = 0, rst = 1, start = 0, stop = 0;
  logic [3:0] width_tens = 0, width_units = 2, delay_sel = 3;
  ops_sel_t ops_sel = OPS_10;
  logic [15:0] rep_period = 16'd50;
  logic count_in = 0;
  logic pns_trig, operate_lamp;
  logic scan_start = 0, scan_manual = 0;
  logic [3:0] scan_position;
  channel_digits_t readout;
  code1224_t [2:0] ch1_lamps;
  code1224_t [1:0] ch10_lamps;
  chassis_counts_t counts;
  code1224_t [2:0] ops_count;
  logic ops_done;

  reactivity_measurement_system dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  typedef enum int {M_CYCLE, M_BACKGROUND, M_CARRY, M_OPS_DONE, M_SCAN_CONT, M_SCAN_MANUAL, M_N} mech_e;
  int mech[M_N];
  string mech_name[M_N] = '{"cycle", "background count", "decade carry", "operations done",
                            "continuous scan", "manual scan"};

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // ---------------- detector model and event log ----------------
  longint cyc = 0;
  longint pulses[$];     // cycle in which each count pulse reaches the gates
  longint trigs[$];      // first cycle of each trigger pulse
  longint last_trig = -1000000;
  bit trig_q = 0, low_gap = 1;
  real bg_p = 0.002, burst_p = 0.45, tau = 10000.0;

  always @(posedge clk) begin
    real p;
    if (pns_trig && !trig_q) begin trigs.push_back(cyc); last_trig = cyc; end
    trig_q = pns_trig;
    if (count_in) pulses.push_back(cyc + 2);
    cyc = cyc + 1;
    p = bg_p + ((cyc > last_trig) ? burst_p * $exp(-real'(cyc - last_trig) / tau) : 0.0);
    if (count_in || rst) count_in <= 0;
    else count_in <= (real'($urandom % 100000) / 100000.0) < p;
  end

  function automatic int value(input channel_digits_t d);
    int v = 0;
    for (int i = MAX_DECADES - 1; i >= 0; i--)
      v = v * 10 + d[i][0] + 2 * d[i][1] + 2 * d[i][2] + 4 * d[i][3];
    return v;
  endfunction

  // Expected counts from the logged pulses and triggers.
  task automatic check_counts(input int tw, input int n, input string phase);
    int expv[NUM_CHANNELS];
    foreach (expv[k]) expv[k] = 0;
    foreach (pulses[i]) begin
      longint m = pulses[i];
      foreach (trigs[j]) begin
        longint tt = trigs[j];
        if (m >= tt - 2 * tw && m <= tt - tw - 1) expv[0]++;
        for (int c = 1; c <= 10; c++)
          if (m >= tt + (n + c - 1) * tw && m <= tt + (n + c) * tw - 1) expv[c]++;
      end
    end
    for (int k = 0; k < NUM_CHANNELS; k++) begin
      int got = value(counts[k]);
      check(got == expv[k], $sformatf("%s channel %0d expected %0d got %0d", phase, k, expv[k], got));
      if (got >= 10) mech[M_CARRY]++;
    end
    if (expv[0] > 0) mech[M_BACKGROUND]++;
    check(expv[1] > expv[10], $sformatf("%s decay: ch1 %0d ch10 %0d", phase, expv[1], expv[10]));
    $display("%s counts: bg %0d, ch1..10 %0d %0d %0d %0d %0d %0d %0d %0d %0d %0d", phase, expv[0],
             expv[1], expv[2], expv[3], expv[4], expv[5], expv[6], expv[7], expv[8], expv[9], expv[10]);
  endtask

  task automatic do_reset();
    @(negedge clk) rst = 1;
    repeat (3) @(negedge clk);
    rst = 0;
    pulses.delete(); trigs.delete();
  endtask

  task automatic press(ref logic b);
    @(negedge clk) b = 1;
    repeat (2) @(negedge clk);
    b = 0;
  endtask

  // watchdog
  initial begin
    repeat (200_000_000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ntr;
    foreach (mech[i]) mech[i] = 0;

    // ---- one operation: W = 10, N = 2, 10 cps, 10 cycles ----
    width_tens = 1; width_units = 0; delay_sel = 2; ops_sel = OPS_10; rep_period = 16'd5000;
    do_reset();
    press(start);
    check(operate_lamp, "operate lamp on after START");
    wait (ops_done);
    repeat (5) @(negedge clk);
    check(trigs.size() == 10, $sformatf("10 triggers, got %0d", trigs.size()));
    check(value({12'd0, ops_count}) == 10, "operation counter reads 10");
    check(!operate_lamp, "operate lamp off when done");
    mech[M_CYCLE] += trigs.size();
    mech[M_OPS_DONE]++;
    for (int j = 1; j < trigs.size(); j++)
      check(trigs[j] - trigs[j-1] == 5000 * TICK || trigs[j] - trigs[j-1] == 5000 * TICK + 10 * TICK,
            $sformatf("trigger spacing %0d", trigs[j] - trigs[j-1]));
    check_counts(10 * TICK, 2, "operation");
    check(ch1_lamps == {counts[1][5], counts[1][4], counts[1][3]}, "channel 1 lamps");
    check(ch10_lamps == {counts[10][3], counts[10][2]}, "channel 10 lamps");
    // ---- readout through the scanner ----
    // START is held until the switch leaves home, as the push button is
    @(negedge clk) scan_manual = 0;
    scan_start = 1;
    wait (scan_position != 0);
    @(negedge clk) scan_start = 0;
    for (int p = 1; p <= 12; p++) begin
      int want;
      want = p % 12;
      if (p > 1) @(scan_position);
      @(negedge clk);
      check(scan_position == 4'(want), $sformatf("scan position %0d got %0d", want, scan_position));
      if (want != 0) check(readout == counts[want - 1], $sformatf("readout at position %0d", want));
    end
    repeat (SCAN_DIV * TICK / 2) @(negedge clk);
    check(scan_position == 0 && readout == '0, "scanner back home");
    if (scan_position == 0) mech[M_SCAN_CONT]++;
    scan_manual = 1;
    scan_start = 1;
    wait (scan_position == 2);
    @(negedge clk) scan_start = 0;
    repeat (SCAN_DIV * TICK / 2) @(negedge clk);
    check(scan_position == 2 && readout == counts[1], "manual scan holds on channel 1");
    if (scan_position == 2) mech[M_SCAN_MANUAL]++;

    for (int i = 0; i < M_N; i++) begin
      $display("mechanism %-22s %0d", mech_name[i], mech[i]);
      check(mech[i] > 0, $sformatf("mechanism %s never happened", mech_name[i]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
