// reactivity_measurement_system: pulsed-neutron reactivity measurement system.
//
// The system measures the decay of the neutron flux in a reactor after a
// short burst from a pulsed neutron source (PNS). Every cycle it counts the
// detector pulses in one channel width before the burst (background), fires
// the PNS, waits N channel widths, then counts in ten consecutive channels
// of equal width. Cycles repeat at the repetition rate and the counts add up
// over 10, 100 or 1000 cycles; the decay constant is the slope of the
// logarithm of the background-corrected counts against channel number.
//
// Structure (all one clock domain, every pulse a one-clock enable):
//   timing_pulse_source    50 kc pulses from the master clock
//   channel_width_selector T = 50 kc / W, W = 1..100 (20..2000 us)
//   rep_rate_oscillator    cycle start requests, 1..10 per second
//   start_gate             START / STOP / operation counter done
//   gate_control           flip-flops A..H, AND gates 12..16
//   delay_counter          N channel widths from trigger to counting
//   shift_register         F1..F11, one counting channel per T
//   pns_trigger            trigger output on the leading edge of D
//   count_pulse_shaper     detector input to one-clock count pulses
//   count_gates            AND gates 1..11
//   decade_counter_chassis eleven channels of 1-2-2-4 decades
//   operation_counter      cycles done, 10-100-1000
//   scanner                stepping-switch readout, 1 channel per second
//
// Ports: switch settings come in as binary values (width_tens 0..9,
// width_units 1..10, delay_sel 1..10, ops_sel, rep_period in 50 kc pulses).
// counts brings every decade out (the recorder cabling); ch1_lamps and
// ch10_lamps are the panel lamps (decades 4-6 of channel 1, 3-4 of channel
// 10); readout and scan_position come from the scanner. operate_lamp is lit
// while the start gate is armed or a cycle is running.
// The sequencing follows the original design; the single master clock, the
// binary switch inputs and the digital oscillators are this design's
// choices.
module reactivity_measurement_system
  import rms_pkg::*;
#(
  parameter int unsigned CLK_HZ           = 10_000_000,
  parameter int unsigned PNS_PULSE_CYCLES = 10,
  parameter int unsigned SCAN_STEP_DIV    = 50_000
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                start,
  input  logic                stop,
  input  logic [3:0]          width_tens,
  input  logic [3:0]          width_units,
  input  logic [3:0]          delay_sel,
  input  ops_sel_t            ops_sel,
  input  logic [15:0]         rep_period,
  input  logic                count_in,
  output logic                pns_trig,
  output logic                operate_lamp,
  input  logic                scan_start,
  input  logic                scan_manual,
  output logic [3:0]          scan_position,
  output channel_digits_t     readout,
  output code1224_t [2:0]     ch1_lamps,
  output code1224_t [1:0]     ch10_lamps,
  output chassis_counts_t     counts,
  output code1224_t [2:0]     ops_count,
  output logic                ops_done
);

  logic tick50k, t_pulse, rep_pulse, s;
  logic delay_done, wrap, shift, delay_count, cycle_start, d_set, cycle_end;
  logic count_pulse, scan_step;
  gate_ff_t ff;
  logic [NUM_CHANNELS-1:0] f, gated;

  timing_pulse_source #(.CLK_HZ(CLK_HZ), .BASE_HZ(50_000)) u_osc (
    .clk(clk), .rst(rst), .tick(tick50k)
  );

  channel_width_selector u_width (
    .clk(clk), .rst(rst), .tick50k(tick50k),
    .width_tens(width_tens), .width_units(width_units), .t_pulse(t_pulse)
  );

  rep_rate_oscillator #(.PERIOD_W(16)) u_rep (
    .clk(clk), .rst(rst), .tick50k(tick50k), .period(rep_period), .rep_pulse(rep_pulse)
  );

  start_gate u_start (
    .clk(clk), .rst(rst), .start(start), .stop(stop), .ops_done(ops_done), .s(s)
  );

  gate_control u_gc (
    .clk(clk), .rst(rst), .t_pulse(t_pulse), .s(s), .rep_pulse(rep_pulse),
    .delay_done(delay_done), .wrap(wrap), .ff(ff), .shift(shift),
    .delay_count(delay_count), .cycle_start(cycle_start), .d_set(d_set),
    .cycle_end(cycle_end)
  );

  delay_counter u_delay (
    .clk(clk), .rst(rst), .load(cycle_start), .count_en(delay_count),
    .delay_sel(delay_sel), .done(delay_done)
  );

  shift_register #(.STAGES(NUM_CHANNELS)) u_sr (
    .clk(clk), .rst(rst), .shift(shift), .f(f), .wrap(wrap)
  );

  pns_trigger #(.PULSE_CYCLES(PNS_PULSE_CYCLES)) u_pns (
    .clk(clk), .rst(rst), .fire(d_set), .trigger(pns_trig)
  );

  count_pulse_shaper u_shaper (
    .clk(clk), .rst(rst), .count_in(count_in), .count_pulse(count_pulse)
  );

  count_gates u_gates (
    .count_pulse(count_pulse), .f(f), .a(ff.a), .gated(gated)
  );

  decade_counter_chassis u_chassis (
    .clk(clk), .rst(rst), .gated(gated), .counts(counts)
  );

  operation_counter #(.DIGITS(3)) u_ops (
    .clk(clk), .rst(rst), .cycle_end(cycle_end), .ops_sel(ops_sel),
    .count(ops_count), .done(ops_done)
  );

  scanner #(.STEP_DIV(SCAN_STEP_DIV)) u_scan (
    .clk(clk), .rst(rst), .tick50k(tick50k), .start(scan_start),
    .manual(scan_manual), .counts(counts), .position(scan_position),
    .readout(readout), .step(scan_step)
  );

  assign operate_lamp = s || ff.b;
  assign ch1_lamps    = {counts[1][5], counts[1][4], counts[1][3]};
  assign ch10_lamps   = {counts[10][3], counts[10][2]};

endmodule
