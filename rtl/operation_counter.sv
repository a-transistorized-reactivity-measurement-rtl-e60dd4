// operation_counter: counts finished measurement cycles, 10-100-1000.
//
// Three decades count one per finished cycle from zero. The carry out of
// decade 1, 2 or 3, chosen by ops_sel, marks 10, 100 or 1000 cycles and sets
// done, which holds until reset and turns the start gate off. The TEST
// position of the panel switch is not described and behaves as 1000.
//
// Interface: cycle_end is a one-clock pulse per cycle; count is the three
// decades in 1-2-2-4 code, least significant first. Timing: done rises one
// clock after the cycle_end pulse that completes the count.
module operation_counter
  import rms_pkg::*;
#(
  parameter int unsigned DIGITS = 3
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   cycle_end,
  input  ops_sel_t               ops_sel,
  output code1224_t [DIGITS-1:0] count,
  output logic                   done
);

  logic [DIGITS:0]   c;
  logic [DIGITS-1:0] full;
  logic              hit;
  int unsigned       sel;

  assign c[0] = cycle_end;

  for (genvar i = 0; i < DIGITS; i++) begin : g_dec
    decade_counter u_dec (
      .clk       (clk),
      .rst       (rst),
      .en        (c[i]),
      .load      (1'b0),
      .load_value(4'd0),
      .q         (count[i]),
      .full      (full[i]),
      .carry     (c[i+1])
    );
  end

  always_comb begin
    unique case (ops_sel)
      OPS_10:  sel = 1;
      OPS_100: sel = 2;
      default: sel = 3;
    endcase
    if (sel > DIGITS) sel = DIGITS;
    hit = c[sel];
  end

  always_ff @(posedge clk) begin
    if (rst)      done <= 1'b0;
    else if (hit) done <= 1'b1;
  end

endmodule
