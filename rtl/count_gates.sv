// count_gates: the two-input AND gates that route neutron counts.
//
// Gate k (1..10) passes the shaped count pulse to counter k while shift
// register stage F(k+1) is ON; gate 11 passes it to the background counter
// while flip-flop A is ON. Only one of these is ON at a time, so each count
// reaches at most one counter.
//
// Interface: f[0] = F1 .. f[10] = F11; gated[0] is the background counter,
// gated[k] counter k. Purely combinational.
module count_gates
  import rms_pkg::*;
(
  input  logic                    count_pulse,
  input  logic [NUM_CHANNELS-1:0] f,
  input  logic                    a,
  output logic [NUM_CHANNELS-1:0] gated
);

  always_comb begin
    gated[0] = count_pulse && a;
    for (int k = 1; k < int'(NUM_CHANNELS); k++) gated[k] = count_pulse && f[k];
  end

endmodule
