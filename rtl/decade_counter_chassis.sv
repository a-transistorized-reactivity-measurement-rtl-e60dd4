// decade_counter_chassis: the eleven counting channels of the system.
//
// Channel index 0 is the background counter, 1..10 are the time channels.
// Channels 1 to 6 have six decades; the background channel and channels 7
// to 10 have five, as in the two original chassis (the first channel sees
// the most counts). Each channel counts the one-clock pulses on its gated
// input. The sixth decade of a five-decade channel reads zero in counts.
//
// Interface: gated[k] counts channel k; counts[k][i] is decade i (least
// significant first) of channel k in 1-2-2-4 code. Timing: one clock.
module decade_counter_chassis
  import rms_pkg::*;
(
  input  logic                          clk,
  input  logic                          rst,
  input  logic [NUM_CHANNELS-1:0]       gated,
  output chassis_counts_t               counts
);

  // Decades fitted to each channel.
  function automatic int unsigned decades_of(input int unsigned ch);
    return (ch >= 1 && ch <= 6) ? 6 : 5;
  endfunction

  for (genvar k = 0; k < NUM_CHANNELS; k++) begin : g_ch
    localparam int unsigned N = decades_of(k);
    code1224_t [N-1:0] d;

    counting_channel #(.DIGITS(N)) u_ch (
      .clk   (clk),
      .rst   (rst),
      .en    (gated[k]),
      .digits(d)
    );

    always_comb begin
      counts[k] = '0;
      for (int i = 0; i < int'(N); i++) counts[k][i] = d[i];
    end
  end

endmodule
