// count_pulse_shaper: turns each neutron detector pulse into one count pulse.
//
// The detector output (Count In) is asynchronous. It passes through a
// two-flop synchroniser, and the rising edge of the synchronised signal
// gives a one-clock count pulse, the digital counterpart of the standard
// 0.15 us pulse the original shaper produced. Detector pulses must be at
// least one clk period high and one low to be counted.
//
// Interface: count_pulse is one clk wide, two to three clocks after the
// rising edge of count_in.
module count_pulse_shaper (
  input  logic clk,
  input  logic rst,
  input  logic count_in,
  output logic count_pulse
);

  logic [2:0] sync;

  assign count_pulse = sync[1] && !sync[2];

  always_ff @(posedge clk) begin
    if (rst) sync <= '0;
    else     sync <= {sync[1:0], count_in};
  end

endmodule
