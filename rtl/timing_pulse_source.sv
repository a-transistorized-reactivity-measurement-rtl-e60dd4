// timing_pulse_source: the 50 kc timing pulse train of the control chassis.
//
// The original used a crystal oscillator and pulse shaper. Here a counter
// divides the master clock by CLK_HZ / BASE_HZ and emits a one-clock tick
// at the end of every period. The division and the master clock are this
// design's choices; the 50 kc rate is the original's.
//
// Interface: tick is high for one clk cycle every CLK_HZ / BASE_HZ cycles,
// first at the end of the first full period after rst.
module timing_pulse_source #(
  parameter int unsigned CLK_HZ  = 10_000_000,
  parameter int unsigned BASE_HZ = 50_000
) (
  input  logic clk,
  input  logic rst,
  output logic tick
);

  localparam int unsigned DIV = CLK_HZ / BASE_HZ;
  localparam int unsigned W   = (DIV > 1) ? $clog2(DIV) : 1;

  initial assert (DIV >= 1) else $error("CLK_HZ must be at least BASE_HZ");

  logic [W-1:0] cnt;

  assign tick = (cnt == W'(DIV - 1));

  always_ff @(posedge clk) begin
    if (rst || tick) cnt <= '0;
    else             cnt <= cnt + 1'b1;
  end

endmodule
