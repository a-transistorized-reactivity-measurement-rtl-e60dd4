// pns_trigger: trigger pulse for the pulsed neutron source.
//
// Each fire pulse (flip-flop D being set) starts an output pulse of
// PULSE_CYCLES clocks. The original drove a 3 V pulse into 50 ohms from the
// leading edge of D; the level and driver are outside the logic, and the
// pulse width is this design's choice (1 us at a 10 MHz clock).
//
// Interface: fire is a one-clock pulse; trigger rises on the next clock and
// stays high for PULSE_CYCLES clocks. A fire during a pulse restarts it.
module pns_trigger #(
  parameter int unsigned PULSE_CYCLES = 10
) (
  input  logic clk,
  input  logic rst,
  input  logic fire,
  output logic trigger
);

  localparam int unsigned W = $clog2(PULSE_CYCLES + 1);

  logic [W-1:0] left;

  assign trigger = (left != '0);

  always_ff @(posedge clk) begin
    if (rst)           left <= '0;
    else if (fire)     left <= W'(PULSE_CYCLES);
    else if (trigger)  left <= left - 1'b1;
  end

endmodule
