// decade_counter: one decade of a pulse counter in the 1-2-2-4 code.
//
// The weight-1 stage toggles on every count pulse; the three upper stages
// (weights 2, 2, 4) step through a five-state sequence each time the weight-1
// stage falls, so the decade counts 0..9 and wraps. carry is high for the
// count pulse that takes the decade from 9 to 0 and drives the next decade.
// A load sets every stage at once to the digit on load_value; this is the
// preset input that makes a decade usable as a preset counter, and it has
// priority over counting.
//
// Interface: en is a one-clock count pulse. q holds the stages, bit 0 weight 1,
// bits 1 and 2 weight 2, bit 3 weight 4. full is high while the decade holds 9.
// Timing: q changes on the clock edge after en; carry is combinational.
// The 1-2-2-4 code and the preset follow the original counter card; the stage
// sequence and the synchronous form are this design's choices.
module decade_counter
  import rms_pkg::*;
(
  input  logic      clk,
  input  logic      rst,
  input  logic      en,
  input  logic      load,
  input  logic [3:0] load_value,
  output code1224_t q,
  output logic      full,
  output logic      carry
);

  code1224_t q_next;

  // Next state of the 2-2-4 stages when the weight-1 stage falls.
  function automatic logic [2:0] step_hi(input logic [2:0] hi);
    unique case (hi)
      3'b000:  return 3'b001;
      3'b001:  return 3'b011;
      3'b011:  return 3'b110;
      3'b110:  return 3'b111;
      default: return 3'b000;  // 111, and any unused state, return to 0
    endcase
  endfunction

  always_comb begin
    q_next = q;
    if (q[0]) q_next = {step_hi(q[3:1]), 1'b0};
    else      q_next = {q[3:1], 1'b1};
  end

  assign full  = (q == to_1224(4'd9));
  assign carry = en && full && !load;

  always_ff @(posedge clk) begin
    if (rst)       q <= '0;
    else if (load) q <= to_1224(load_value);
    else if (en)   q <= q_next;
  end

endmodule
