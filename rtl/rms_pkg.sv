// rms_pkg: types and helper functions shared by the reactivity measurement system.
//
// Counter decades use the 1-2-2-4 code of the original counter cards: four
// stages with weights 1, 2, 2 and 4 (bit 0 .. bit 3). The sequence of the 2-2-4
// stages is this design's choice: 000, 100, 110, 011, 111 (bits 1..3) for the
// half-counts 0..4. The functions below convert between that code and binary.
package rms_pkg;

  // One decade in 1-2-2-4 code, bit 0 weight 1, bits 1 and 2 weight 2, bit 3 weight 4.
  typedef logic [3:0] code1224_t;

  // Number of counting channels: background plus ten time channels.
  localparam int unsigned NUM_CHANNELS = 11;
  // Widest counting channel, in decades.
  localparam int unsigned MAX_DECADES  = 6;

  typedef code1224_t [MAX_DECADES-1:0] channel_digits_t;
  typedef channel_digits_t [NUM_CHANNELS-1:0] chassis_counts_t;

  // Gate-control flip-flops of the control chassis.
  typedef struct packed {
    logic a;  // background window, one channel width
    logic b;  // cycle in progress, inhibits AND gate 12
    logic c;  // one channel width between background and trigger
    logic d;  // delay after the neutron source trigger
    logic e;  // counting window, arms the shift line
    logic g;  // set by the leading edge of H
    logic h;  // set by the repetition-rate oscillator
  } gate_ff_t;

  // Operation counter preset (switch S5).
  typedef enum logic [1:0] {
    OPS_10   = 2'd0,
    OPS_100  = 2'd1,
    OPS_1000 = 2'd2,
    OPS_TEST = 2'd3   // printed on the panel, not described; behaves as 1000
  } ops_sel_t;

  // Binary digit 0..9 to 1-2-2-4 code.
  function automatic code1224_t to_1224(input logic [3:0] d);
    logic [2:0] hi;
    unique case (d[3:1])
      3'd0:    hi = 3'b000;
      3'd1:    hi = 3'b001;  // weight 2
      3'd2:    hi = 3'b011;  // 2 + 2
      3'd3:    hi = 3'b110;  // 2 + 4
      default: hi = 3'b111;  // 2 + 2 + 4
    endcase
    return {hi, d[0]};
  endfunction

  // 1-2-2-4 code to its value: the weighted sum of the stages.
  function automatic logic [3:0] from_1224(input code1224_t q);
    return 4'(q[0]) + 4'(2 * q[1]) + 4'(2 * q[2]) + 4'(4 * q[3]);
  endfunction

endpackage
