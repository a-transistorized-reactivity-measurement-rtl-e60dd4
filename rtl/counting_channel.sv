// counting_channel: one counting channel of the decade counter chassis.
//
// DIGITS decade_counter stages in a ripple-carry chain count the neutron
// pulses gated to this channel. The count is kept until reset so that it can
// be read out after the set number of cycles. The chain wraps to zero past
// the top decade (overflow is not flagged).
//
// Interface: en is a one-clock count pulse; digits[0] is the least
// significant decade, each in 1-2-2-4 code. Timing: a pulse is in digits on
// the next clock edge; all decades update on the same edge.
// Six decades for channels 1-6 and five for the others follow the original
// chassis; the synchronous carry chain is this design's choice.
module counting_channel
  import rms_pkg::*;
#(
  parameter int unsigned DIGITS = 6
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   en,
  output code1224_t [DIGITS-1:0] digits
);

  logic [DIGITS:0] c;   // c[i] is the count pulse into decade i
  logic [DIGITS-1:0] full_unused;

  assign c[0] = en;

  for (genvar i = 0; i < DIGITS; i++) begin : g_dec
    decade_counter u_dec (
      .clk       (clk),
      .rst       (rst),
      .en        (c[i]),
      .load      (1'b0),
      .load_value(4'd0),
      .q         (digits[i]),
      .full      (full_unused[i]),
      .carry     (c[i+1])
    );
  end

endmodule
