// rep_rate_oscillator: starts each measurement cycle, 1 to 10 times a second.
//
// The original is a double-base diode oscillator whose rate is set by a
// potentiometer. Here a counter of 50 kc pulses emits rep_pulse once every
// `period` pulses (5000 for 10 cps, 50000 for 1 cps); the period input
// stands for the potentiometer. Values below 1 are treated as 1.
//
// Interface: rep_pulse is one clk cycle wide, combinational with the
// tick50k pulse that ends the period. Timing: the first pulse comes one full
// period after rst.
module rep_rate_oscillator #(
  parameter int unsigned PERIOD_W = 16
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                tick50k,
  input  logic [PERIOD_W-1:0] period,
  output logic                rep_pulse
);

  logic [PERIOD_W-1:0] cnt;

  assign rep_pulse = tick50k && (cnt + 1'b1 >= period);

  always_ff @(posedge clk) begin
    if (rst)            cnt <= '0;
    else if (rep_pulse) cnt <= '0;
    else if (tick50k)   cnt <= cnt + 1'b1;
  end

endmodule
