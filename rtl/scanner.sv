// scanner: the stepping-switch scanner that reads out one channel at a time.
//
// The switch has twelve positions: 0 is home (the last position, where the
// off-normal contact stops it), 1 the background channel and 2..11 channels
// 1..10. While stepping is enabled the switch advances one position every
// STEP_DIV pulses of 50 kc (1 step per second). In continuous mode stepping
// is enabled away from home, so one press of START scans all eleven
// channels and returns home; in manual mode (manual = 1) it steps only while
// START is held and stays where it is when START is released. The readout
// is the selected channel's six decades, all zero at home. Reading does not
// disturb the counters.
//
// Interface: counts from the counter chassis; position and readout follow
// the switch. step is a one-clock pulse per step. Timing: the step timer
// restarts whenever stepping is disabled, so the first step comes one full
// step period after stepping is enabled. The relay and interrupter
// mechanics of the original are replaced by this timer.
module scanner
  import rms_pkg::*;
#(
  parameter int unsigned STEP_DIV = 50_000
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            tick50k,
  input  logic            start,
  input  logic            manual,
  input  chassis_counts_t counts,
  output logic [3:0]      position,
  output channel_digits_t readout,
  output logic            step
);

  localparam logic [3:0] LAST = 4'(NUM_CHANNELS);
  localparam int unsigned W   = (STEP_DIV > 1) ? $clog2(STEP_DIV) : 1;

  logic         step_en;
  logic [W-1:0] timer;

  assign step_en = start || (!manual && position != 4'd0);
  assign step    = step_en && tick50k && (timer == W'(STEP_DIV - 1));

  always_ff @(posedge clk) begin
    if (rst || !step_en) timer <= '0;
    else if (step)       timer <= '0;
    else if (tick50k)    timer <= timer + 1'b1;
  end

  always_ff @(posedge clk) begin
    if (rst)       position <= 4'd0;
    else if (step) position <= (position == LAST) ? 4'd0 : position + 4'd1;
  end

  always_comb begin
    readout = '0;
    for (int k = 0; k < int'(NUM_CHANNELS); k++)
      if (position == 4'(k + 1)) readout = counts[k];
  end

endmodule
