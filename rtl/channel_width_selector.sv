// channel_width_selector: makes the channel-width timing pulse T.
//
// The 50 kc pulses are divided by W = 10 * width_tens + width_units, any
// integer from 1 to 100, by a two-decade preset counter set to 100 - W. T
// therefore comes every W * 20 us: channel widths of 20 to 2000 us. The two
// rotary switches of the original (tens S1, units S2) become two binary
// inputs; width_units is 1..10. Settings outside the range are clamped to it.
//
// Interface: tick50k is the 50 kc pulse; t_pulse is a one-clock pulse,
// combinational with the tick50k pulse that completes the count.
// Timing: a change of the switches takes effect after the current period.
module channel_width_selector (
  input  logic       clk,
  input  logic       rst,
  input  logic       tick50k,
  input  logic [3:0] width_tens,
  input  logic [3:0] width_units,
  output logic       t_pulse
);

  logic [6:0]      w;
  logic [6:0]      p;       // preset, 100 - W
  logic [1:0][3:0] preset;

  always_comb begin
    w = 7'(10 * 32'(width_tens > 4'd9 ? 4'd9 : width_tens))
      + 7'(width_units > 4'd10 ? 4'd10 : width_units);
    if (w == 7'd0) w = 7'd1;
    p         = 7'd100 - w;
    preset[0] = 4'(p % 7'd10);
    preset[1] = 4'(p / 7'd10);
  end

  preset_counter #(.DIGITS(2)) u_div (
    .clk   (clk),
    .rst   (rst),
    .en    (tick50k),
    .load  (1'b0),
    .preset(preset),
    .pulse (t_pulse)
  );

endmodule
