// tb_rms_workloads: the two measurement conditions the system was sized for.
//
//   delayed critical: tau = 6.35 ms, N0 = 1e5 counts/s at the start of
//     counting, channel width 1.9 ms (W = 95, about 0.3 tau), 1000 cycles.
//     Expected per cycle from N0 tau (exp(-(c-1)0.3) - exp(-c 0.3)):
//     about 164, 122, 90, 67, 49, 37, 27, 20, 15, 11; over 1000 cycles
//     channel 1 needs all six of its decades.
//   -15 dollars: tau = 0.4 ms, same N0, width 100 us (W = 5), 100 cycles.
//
// A detector model gives a constant 200 counts/s background plus
// N0 exp(-(t - t2)/tau) from the opening of channel 1 (t2). The counters
// are compared exactly with counts predicted from the logged pulses and
// triggers, the background-corrected channel totals with the analytic
// expectation (within 6 percent or 4 standard deviations), and the decay
// constant fitted from channels 1 and 10 with the model's tau (within 5
// percent or four standard deviations of the fit). The master clock is
// reduced to 1 MHz; each detector pulse is one clock wide with at least one clock between pulses, and the model
// compensates for that dead clock.
module tb_rms_workloads;
  import rms_pkg::*;

  localparam int unsigned CLK_HZ = 1_000_000;
  localparam int          TICK   = CLK_HZ / 50_000;

  logic clk = 0, rst = 1, start = 0, stop = 0;
  logic [3:0] width_tens = 0, width_units = 1, delay_sel = 2;
  ops_sel_t ops_sel = OPS_1000;
  logic [15:0] rep_period = 16'd5000;
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

  reactivity_measurement_system #(.CLK_HZ(CLK_HZ), .PNS_PULSE_CYCLES(2), .SCAN_STEP_DIV(4)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // ---- detector model with on-line bookkeeping of expected counts ----
  real    n0_per_clk = 1.0e5 / CLK_HZ, bg_per_clk = 200.0 / CLK_HZ, tau_clk = 6350.0;
  int     tw = 95 * TICK, nd = 2;
  longint cyc = 0, tt = -1, t2 = -1;
  longint recent[$];
  int     expv[NUM_CHANNELS];
  int     ntrig = 0;
  bit     trig_q = 0;

  always @(posedge clk) begin
    real r, p;
    if (pns_trig && !trig_q) begin
      tt = cyc;
      t2 = tt + nd * tw;
      ntrig++;
      foreach (recent[i])
        if (recent[i] >= tt - 2 * tw && recent[i] <= tt - tw - 1) expv[0]++;
    end
    trig_q = pns_trig;
    if (count_in) begin
      longint m;
      m = cyc + 2;           // the clock in which the pulse reaches the gates
      recent.push_back(m);
      if (tt >= 0 && m >= t2 && m < t2 + 10 * tw) expv[(m - t2) / tw + 1]++;
    end
    while (recent.size() > 0 && recent[0] < cyc - 3 * tw) void'(recent.pop_front());
    cyc = cyc + 1;
    r = bg_per_clk + ((t2 >= 0 && cyc >= t2) ? n0_per_clk * $exp(-real'(cyc - t2) / tau_clk) : 0.0);
    p = r / (1.0 - r);       // one dead clock after each pulse
    if (count_in || rst) count_in <= 0;
    else count_in <= (real'($urandom % 1000000) / 1000000.0) < p;
  end

  function automatic int value(input channel_digits_t d);
    int v = 0;
    for (int i = MAX_DECADES - 1; i >= 0; i--)
      v = v * 10 + d[i][0] + 2 * d[i][1] + 2 * d[i][2] + 4 * d[i][3];
    return v;
  endfunction

  task automatic run(input string name, input int w, input real tau_s, input ops_sel_t sel, input int ncyc);
    real width_s, bg_per_ch, a_fit, sig, tol;
    int got[NUM_CHANNELS];
    width_s = w * 20.0e-6;
    tau_clk = tau_s * CLK_HZ;
    tw = w * TICK;
    width_tens = 4'((w - 1) / 10); width_units = 4'(w - 10 * ((w - 1) / 10));
    ops_sel = sel;
    @(negedge clk) rst = 1;
    repeat (3) @(negedge clk);
    foreach (expv[k]) expv[k] = 0;
    tt = -1; t2 = -1; ntrig = 0; recent.delete();
    rst = 0;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    wait (ops_done);
    repeat (10) @(negedge clk);
    check(ntrig == ncyc, $sformatf("%s: %0d cycles, expected %0d", name, ntrig, ncyc));
    check(value({12'd0, ops_count}) == ncyc % 1000, $sformatf("%s: operation counter", name));
    foreach (got[k]) begin
      got[k] = value(counts[k]);
      check(got[k] == expv[k], $sformatf("%s channel %0d expected %0d got %0d", name, k, expv[k], got[k]));
    end
    bg_per_ch = real'(got[0]);
    for (int c = 1; c <= 10; c++) begin
      real model, meas, tol;
      model = ncyc * 1.0e5 * tau_s * ($exp(-(c - 1) * width_s / tau_s) - $exp(-c * width_s / tau_s));
      meas  = real'(got[c]) - bg_per_ch;
      tol   = 0.06 * model;
      if (tol < 4.0 * $sqrt(model + 2.0 * bg_per_ch)) tol = 4.0 * $sqrt(model + 2.0 * bg_per_ch);
      check(meas > model - tol && meas < model + tol,
            $sformatf("%s channel %0d: %0.0f counts, model %0.0f", name, c, meas, model));
      $display("%s channel %0d: counts %0d, minus background %0.0f, model %0.1f (%0.1f per cycle)",
               name, c, got[c], meas, model, model / ncyc);
    end
    $display("%s background: %0d", name, got[0]);
    // decay constant from channels 1 and 10
    a_fit = $ln((real'(got[1]) - bg_per_ch) / (real'(got[10]) - bg_per_ch)) / (9.0 * width_s);
    $display("%s: fitted time constant %0.3f ms, model %0.3f ms", name, 1.0e3 / a_fit, tau_s * 1.0e3);
    // tolerance: the larger of 5 percent and four standard deviations of the
    // fitted value, from the counting statistics of channels 1 and 10
    sig = $sqrt(1.0 / real'(got[1]) + 1.0 / real'(got[10])) / (a_fit * 9.0 * width_s);
    tol = (4.0 * sig > 0.05) ? 4.0 * sig : 0.05;
    check(1.0 / a_fit > (1.0 - tol) * tau_s && 1.0 / a_fit < (1.0 + tol) * tau_s,
          $sformatf("%s: time constant, tolerance %0.1f percent", name, 100.0 * tol));
  endtask

  initial begin
    repeat (150_000_000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    run("delayed critical", 95, 6.35e-3, OPS_1000, 1000);
    check(value(counts[1]) > 99_999, "channel 1 uses its sixth decade");
    run("-15 dollars", 5, 0.4e-3, OPS_100, 100);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
