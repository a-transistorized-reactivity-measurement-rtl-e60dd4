// tb_preset_counter: checks division by 10^DIGITS - preset.
// For several presets of a two-decade counter the number of input pulses
// between output pulses is measured; a load in mid-count restarts it.
module tb_preset_counter;
  logic clk = 0, rst = 1, en = 0, load = 0;
  logic [1:0][3:0] preset;
  logic pulse;
  int checks = 0, failures = 0;

  preset_counter #(.DIGITS(2)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic measure(input int p);
    int n;
    bit hit;
    preset[1] = 4'(p / 10); preset[0] = 4'(p % 10);
    load = 1; @(posedge clk); #1 load = 0;
    for (int rep = 0; rep < 3; rep++) begin
      n = 0;
      hit = 0;
      while (!hit) begin
        en = ($urandom % 3) != 0;
        #1;
        if (en) n++;
        if (pulse && !en) begin failures++; $display("FAIL pulse without input"); end
        hit = en && pulse;
        @(posedge clk); #1;
      end
      en = 0;
      checks++;
      if (n != 100 - p) begin failures++; $display("FAIL preset %0d: %0d pulses", p, n); end
    end
  endtask

  initial begin
    preset = '0;
    @(posedge clk); #1 rst = 0;
    measure(99); measure(90); measure(63); measure(0); measure(50);
    // load in mid-count restarts from the preset
    preset[1] = 4'd9; preset[0] = 4'd5;
    en = 1; repeat (3) @(posedge clk); #1;
    load = 1; @(posedge clk); #1 load = 0;
    begin
      int n = 0;
      while (1) begin #1; n++; if (pulse) break; @(posedge clk); end
      checks++;
      if (n != 5) begin failures++; $display("FAIL load restart %0d", n); end
    end
    en = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
