// start_gate: the START gate flip-flop S that arms AND gate 12.
//
// START sets S; STOP clears it, and so does the operation counter once the
// preset number of cycles is done. A cycle begins only while S is set, and a
// running cycle does not look at S again, so STOP takes effect at the end of
// the current cycle, as the original did. START is ignored while the
// operation counter reports done; only RESET clears that.
//
// Interface: start and stop are levels sampled each clock; stop wins over
// start. Timing: s changes one clock after its cause.
module start_gate (
  input  logic clk,
  input  logic rst,
  input  logic start,
  input  logic stop,
  input  logic ops_done,
  output logic s
);

  always_ff @(posedge clk) begin
    if (rst)                  s <= 1'b0;
    else if (stop || ops_done) s <= 1'b0;
    else if (start)            s <= 1'b1;
  end

endmodule
