// tb_reactivity_measurement_system: end-to-end test of the whole system.
//
// A detector model sends pulses at a steady background rate plus a burst
// that decays exponentially after every neutron source trigger. Every
// pulse time and every trigger time is recorded; from them the testbench
// works out, with the channel timing of the system (background window two
// channel widths before the trigger, channel c from N + c - 1 to N + c
// widths after it, two clocks of input synchronisation), how many counts
// each counter must hold, and compares with the counters.
//
// Phases:
//   1  W = 2, N = 3, 10 operations: counts, operation counter, done, lamps.
//   2  W = 1, N = 1, 100 operations, repetition period shorter than a
//      cycle (requests during a cycle are ignored), STOP after three
//      cycles (the cycle in progress finishes, then nothing), START again.
//   3  scanner: a continuous scan of all eleven channels, then manual.
// Mechanisms counted; each must happen at least once: cycle, background
// count, decade carry, delay of one width, rep request ignored, stop,
// restart, operations done, continuous scan, manual scan.
module tb_reactivity_measurement_system;
  import rms_pkg::*;

  localparam int unsigned CLK_HZ   = 1_000_000;   // 20 clocks per 50 kc tick
  localparam int unsigned SCAN_DIV = 4;
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

  reactivity_measurement_system #(
    .CLK_HZ(CLK_HZ), .PNS_PULSE_CYCLES(2), .SCAN_STEP_DIV(SCAN_DIV)
  ) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  typedef enum int {M_CYCLE, M_BACKGROUND, M_CARRY, M_DELAY1, M_REP_IGNORED,
                    M_STOP, M_RESTART, M_OPS_DONE, M_SCAN_CONT, M_SCAN_MANUAL, M_N} mech_e;
  int mech[M_N];
  string mech_name[M_N] = '{"cycle", "background count", "decade carry", "delay of one width",
                            "rep request ignored", "stop", "restart", "operations done",
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
  real bg_p = 0.02, burst_p = 0.45, tau = 200.0;

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
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ntr;
    foreach (mech[i]) mech[i] = 0;

    // ---- phase 1: W = 2, N = 3, 10 operations ----
    width_tens = 0; width_units = 2; delay_sel = 3; ops_sel = OPS_10; rep_period = 16'd50;
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
      check(trigs[j] - trigs[j-1] == 50 * TICK || trigs[j] - trigs[j-1] == 50 * TICK + 2 * TICK,
            $sformatf("trigger spacing %0d", trigs[j] - trigs[j-1]));
    check_counts(2 * TICK, 3, "phase 1");
    check(ch1_lamps == {counts[1][5], counts[1][4], counts[1][3]}, "channel 1 lamps");
    check(ch10_lamps == {counts[10][3], counts[10][2]}, "channel 10 lamps");
    // START is ignored once done
    press(start);
    repeat (3000) @(negedge clk);
    check(trigs.size() == 10, "no cycle after done");

    // ---- phase 2: W = 1, N = 1, rep faster than a cycle, STOP / START ----
    width_tens = 0; width_units = 1; delay_sel = 1; ops_sel = OPS_100; rep_period = 16'd10;
    tau = 100.0;
    do_reset();
    press(start);
    wait (trigs.size() == 3);
    press(stop);
    repeat (2000) @(negedge clk);
    ntr = trigs.size();
    check(ntr == 3, $sformatf("the cycle in progress ends after STOP: %0d triggers", ntr));
    check(value({12'd0, ops_count}) == ntr, "every started cycle completed");
    check(!operate_lamp, "operate lamp off after STOP");
    repeat (2000) @(negedge clk);
    check(trigs.size() == ntr, "no cycle while stopped");
    if (trigs.size() == ntr) mech[M_STOP]++;
    press(start);
    wait (trigs.size() == ntr + 4);
    mech[M_RESTART]++;
    press(stop);
    repeat (2000) @(negedge clk);
    mech[M_CYCLE] += trigs.size();
    mech[M_DELAY1]++;
    for (int j = 1; j < trigs.size(); j++)
      if (trigs[j] - trigs[j-1] > 10 * TICK && trigs[j] - trigs[j-1] < 2000) mech[M_REP_IGNORED]++;
    check(mech[M_REP_IGNORED] > 0, "requests during a cycle ignored: spacing longer than the rep period");
    check(value({12'd0, ops_count}) == trigs.size(), "operation count equals cycles");
    check_counts(TICK, 1, "phase 2");

    // ---- phase 3: scanner ----
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
    repeat (20 * SCAN_DIV * TICK) @(negedge clk);
    check(scan_position == 0 && readout == '0, "scanner back home");
    if (scan_position == 0) mech[M_SCAN_CONT]++;
    scan_manual = 1;
    scan_start = 1;
    wait (scan_position == 2);
    @(negedge clk) scan_start = 0;
    repeat (20 * SCAN_DIV * TICK) @(negedge clk);
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
