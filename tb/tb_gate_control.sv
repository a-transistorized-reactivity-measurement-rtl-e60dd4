// tb_gate_control: checks the sequence of one measurement cycle.
// T comes every TW clocks. The delay counter and the shift register are
// modelled here: done on the N-th T(C+D) pulse, wrap on the 11th shift.
// For delays N = 1..10 the testbench checks that the cycle starts on the
// first T after the rep pulse, A is on for one channel width, the trigger
// (D set) comes two widths after the start, the first shift N widths after
// the trigger, and the end ten widths later. It also checks that nothing
// starts while S is off, that a held request starts once S is set, and
// that a rep pulse during a cycle is ignored.
module tb_gate_control;
  import rms_pkg::*;
  localparam int TW = 4;
  logic t_pulse;
  logic clk = 0, rst = 1, s = 0, rep_pulse = 0, delay_done, wrap;
  gate_ff_t ff;
  logic shift, delay_count, cycle_start, d_set, cycle_end;
  int checks = 0, failures = 0;
  int cyc = 0, phase = 0, dcnt = 0, scnt = 0, n_delay = 1;
  int t_start, t_dset, t_shift1, t_end, a_len;
  int starts = 0, ends = 0;

  gate_control dut (.*);

  always #5 clk = ~clk;

  // T generator
  always @(posedge clk) begin
    cyc <= cyc + 1;
    phase <= (phase + 1) % TW;
  end
  assign t_pulse = (phase == TW - 1);

  // models of the delay counter and the shift register
  assign delay_done = delay_count && (dcnt + 1 == n_delay);
  assign wrap       = shift && (scnt == 10);
  always @(posedge clk) begin
    if (cycle_start) dcnt <= 0;
    else if (delay_count) dcnt <= delay_done ? 0 : dcnt + 1;
    if (rst) scnt <= 0;
    else if (shift) scnt <= (scnt + 1) % 11;
  end

  // event times
  always @(posedge clk) begin
    if (cycle_start) begin t_start <= cyc; starts <= starts + 1; end
    if (d_set) t_dset <= cyc;
    if (shift && scnt == 0) t_shift1 <= cyc;
    if (cycle_end) begin t_end <= cyc; ends <= ends + 1; end
    if (ff.a) a_len <= a_len + 1;
    if (cycle_start) a_len <= 0;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic rep();
    @(negedge clk) rep_pulse = 1;
    @(negedge clk) rep_pulse = 0;
  endtask

  task automatic one_cycle(input int n);
    int t_rep, s0;
    n_delay = n;
    s0 = starts;
    wait (phase == 1);
    t_rep = cyc;
    rep();
    wait (ends == s0 + 1 && starts == s0 + 1);
    @(posedge clk); #1;
    check(t_start - t_rep < TW, $sformatf("start %0d after rep", t_start - t_rep));
    check(a_len == TW, $sformatf("A on %0d clocks", a_len));
    check(t_dset - t_start == 2 * TW, $sformatf("trigger %0d after start", t_dset - t_start));
    check(t_shift1 - t_dset == n * TW, $sformatf("N=%0d first shift %0d after trigger", n, t_shift1 - t_dset));
    check(t_end - t_shift1 == 10 * TW, $sformatf("window %0d", t_end - t_shift1));
    check(!ff.b && !ff.e && !ff.h && !ff.a && !ff.c && !ff.d, "all off after cycle");
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    a_len = 0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    // S off: the request waits
    rep();
    repeat (5 * TW) @(posedge clk);
    check(starts == 0, "no start while S off");
    check(ff.h && ff.g, "H and G hold the request");
    @(negedge clk) s = 1;
    wait (ends == 1);
    check(starts == 1, "held request started");
    for (int n = 1; n <= 10; n++) one_cycle(n);
    // rep pulse during a cycle is ignored
    n_delay = 3;
    rep();
    repeat (6 * TW) @(posedge clk);
    rep();
    wait (ends == 12);
    repeat (30 * TW) @(posedge clk);
    check(starts == 12 && ends == 12, $sformatf("rep during cycle ignored: %0d starts", starts));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
