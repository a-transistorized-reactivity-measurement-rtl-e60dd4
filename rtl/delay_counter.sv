// delay_counter: the delay between the neutron source trigger and counting.
//
// A one-decade preset counter, set to 10 - N for a delay switch setting N
// (1..10), counts the timing pulses that arrive while C or D is on (AND
// gate 15, T(C+D)). The first of them is the pulse that turns C off and D on
// and fires the trigger; the N-th gives done, which turns D off and E on.
// The first counting channel then opens N channel widths after the trigger.
// The counter is set again at the start of every cycle (load) and after
// each done.
//
// Interface: count_en is the one-clock T(C+D) pulse; delay_sel is 1..10,
// values outside are clamped. done is combinational with the N-th count_en.
module delay_counter (
  input  logic       clk,
  input  logic       rst,
  input  logic       load,
  input  logic       count_en,
  input  logic [3:0] delay_sel,
  output logic       done
);

  logic [3:0]      n;
  logic [0:0][3:0] preset;

  always_comb begin
    n = delay_sel;
    if (n < 4'd1)  n = 4'd1;
    if (n > 4'd10) n = 4'd10;
    preset[0] = 4'd10 - n;
  end

  preset_counter #(.DIGITS(1)) u_cnt (
    .clk   (clk),
    .rst   (rst),
    .en    (count_en),
    .load  (load),
    .preset(preset),
    .pulse (done)
  );

endmodule
