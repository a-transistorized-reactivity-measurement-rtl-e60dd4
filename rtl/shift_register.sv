// shift_register: the eleven-stage ring that opens the counting channels.
//
// Exactly one stage is ON. F1 (bit 0) is the neutral position; each shift
// pulse passes the ON state to the next stage, so F2..F11 are each ON for
// one channel width and gate counters 1..10 in turn, and the shift out of
// F11 turns F1 ON again. That last shift is reported on wrap and ends the
// counting window. If no stage is ON (never after reset), F1 is set ON, as
// in the original set equation for F1.
//
// Interface: shift is a one-clock pulse; f[0] = F1 .. f[STAGES-1] = F11.
// wrap is combinational: shift while the last stage is ON.
module shift_register #(
  parameter int unsigned STAGES = 11
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              shift,
  output logic [STAGES-1:0] f,
  output logic              wrap
);

  assign wrap = shift && f[STAGES-1];

  always_ff @(posedge clk) begin
    if (rst || f == '0) f <= STAGES'(1);
    else if (shift)     f <= {f[STAGES-2:0], f[STAGES-1]};
  end

endmodule
