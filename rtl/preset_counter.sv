// preset_counter: divide-by-N counter built from presettable decades.
//
// The decades are set to the BCD preset P and count input pulses upward.
// The input pulse that would carry out of the last decade (all decades at 9)
// produces one output pulse and, in the same clock, sets every decade back
// to P. The counter therefore gives one output pulse for every
// 10^DIGITS - P input pulses. This is how the original channel-width and
// delay selectors turned decade counters into count-by-N counters, with a
// rotary switch per decade choosing P.
//
// Interface: en is the one-clock input pulse; preset[i] is the BCD digit of
// decade i (least significant first); load sets the preset now (rst does the
// same). pulse is combinational with the terminal input pulse.
// Timing: the reload takes no extra clock; the original used a blocking
// oscillator delay for it, which is not modelled.
module preset_counter
  import rms_pkg::*;
#(
  parameter int unsigned DIGITS = 2
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    en,
  input  logic                    load,
  input  logic [DIGITS-1:0][3:0]  preset,
  output logic                    pulse
);

  logic [DIGITS:0]        c;
  logic [DIGITS-1:0]      full;
  code1224_t [DIGITS-1:0] q;
  logic                   reload;
  logic [DIGITS-1:0]      carry_unused;  // the chain below is used instead

  assign c[0]   = en;
  assign pulse  = c[DIGITS];
  assign reload = rst || load || pulse;

  for (genvar i = 0; i < DIGITS; i++) begin : g_dec
    decade_counter u_dec (
      .clk       (clk),
      .rst       (1'b0),
      .en        (c[i]),
      .load      (reload),
      .load_value(preset[i]),
      .q         (q[i]),
      .full      (full[i]),
      .carry     (carry_unused[i])
    );
  end

  // Carry chain kept outside the decades so that the terminal pulse is
  // seen before the reload takes effect.
  for (genvar i = 0; i < DIGITS; i++) begin : g_carry
    assign c[i+1] = c[i] && full[i] && !rst && !load;
  end

endmodule
