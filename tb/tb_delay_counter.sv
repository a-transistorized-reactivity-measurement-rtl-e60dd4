// tb_delay_counter: done on the N-th counted pulse after a load, N = 1..10.
module tb_delay_counter;
  logic clk = 0, rst = 1, load = 0, count_en = 0;
  logic [3:0] delay_sel = 1;
  logic done;
  int checks = 0, failures = 0;

  delay_counter dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    @(posedge clk); #1 rst = 0;
    for (int n = 1; n <= 10; n++) begin
      for (int rep = 0; rep < 2; rep++) begin
        int k;
        k = 0;
        delay_sel = 4'(n);
        load = 1; @(posedge clk); #1 load = 0;
        // a few unrelated clocks with no pulses
        repeat ($urandom % 3) @(posedge clk);
        #1;
        forever begin
          count_en = ($urandom % 2) == 1;
          #1;
          if (count_en) k++;
          if (done) break;
          @(posedge clk); #1;
        end
        checks++;
        if (k != n || !count_en) begin failures++; $display("FAIL N=%0d done after %0d", n, k); end
        @(posedge clk); #1 count_en = 0;
        // partial count then reload: restarts from zero
        count_en = 1; @(posedge clk); #1 count_en = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
