// gate_control: the gate-control flip-flops and AND gates 12 to 16.
//
// One measurement cycle runs as a chain of flip-flops stepped by the timing
// pulse T, one channel width apart:
//   H  set by the repetition-rate pulse; its leading edge sets G.
//   A  set at the next T when G, the start gate S and not-B (AND gate 12):
//      A' = G S T B-bar. B is set with it and blocks gate 12 until the
//      cycle ends; G is cleared. A open = background counting window.
//   C  A T turns A off and C on.
//   D  C T turns C off and D on; the leading edge of D fires the neutron
//      source trigger (d_set). AND gate 15 counts T(C+D) into the delay
//      counter, whose done turns D off and E on.
//   E  arms AND gate 16: every following T is a shift pulse (T E) for the
//      shift register F1..F11.
// The shift out of F11 (wrap) turns B, E and H off and is the cycle_end
// pulse for the operation counter. With a delay of 1, done comes with the
// pulse that would set D, so E is set directly and D stays off.
//
// Interface: all inputs are one-clock pulses except s; outputs are the
// flip-flops (ff) and combinational pulses. Timing: flip-flops change on the
// clock edge of the causing pulse. The equations and the order of events
// follow the original; the synchronous form and the clearing of G by gate
// 12 are this design's reading of the block diagram.
module gate_control
  import rms_pkg::*;
(
  input  logic     clk,
  input  logic     rst,
  input  logic     t_pulse,
  input  logic     s,
  input  logic     rep_pulse,
  input  logic     delay_done,
  input  logic     wrap,
  output gate_ff_t ff,
  output logic     shift,
  output logic     delay_count,
  output logic     cycle_start,
  output logic     d_set,
  output logic     cycle_end
);

  gate_ff_t nx;

  assign cycle_start = ff.g && s && t_pulse && !ff.b;   // AND gate 12
  assign d_set       = ff.c && t_pulse;                 // AND gate 14
  assign delay_count = t_pulse && (ff.c || ff.d);       // OR gate, AND gate 15
  assign shift       = t_pulse && ff.e;                 // AND gate 16
  assign cycle_end   = wrap;

  always_comb begin
    nx = ff;
    // H and G
    if (rep_pulse && !ff.h) begin
      nx.h = 1'b1;
      nx.g = 1'b1;
    end
    // A and B (gate 12), G cleared by the same pulse
    if (cycle_start) begin
      nx.a = 1'b1;
      nx.b = 1'b1;
      nx.g = 1'b0;
    end
    // A off, C on (gate 13)
    if (ff.a && t_pulse) begin
      nx.a = 1'b0;
      nx.c = 1'b1;
    end
    // C off, D on (gate 14)
    if (d_set) begin
      nx.c = 1'b0;
      nx.d = 1'b1;
    end
    // delay counter done: D off, E on
    if (delay_done) begin
      nx.d = 1'b0;
      nx.e = 1'b1;
    end
    // end of the counting window
    if (wrap) begin
      nx.b = 1'b0;
      nx.e = 1'b0;
      nx.h = 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) ff <= '0;
    else     ff <= nx;
  end

  // Only one of A, C, D, E is on at a time.
  a_one_phase: assert property (@(posedge clk) disable iff (rst)
    $onehot0({ff.a, ff.c, ff.d, ff.e}));
  // A cycle is not started while one is running.
  a_no_restart: assert property (@(posedge clk) disable iff (rst)
    cycle_start |-> !ff.a && !ff.c && !ff.d && !ff.e);

endmodule
