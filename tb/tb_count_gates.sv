// tb_count_gates: each count goes only to the counter whose gate is open.
module tb_count_gates;
  logic count_pulse, a;
  logic [10:0] f, gated, exp;
  int checks = 0, failures = 0;

  count_gates dut (.*);

  initial begin
    #100000;
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int i = 0; i < 400; i++) begin
      count_pulse = $urandom % 2;
      a = (i % 12) == 0;
      f = a ? 11'd1 : 11'(1 << (i % 12 - 1));
      if (i % 5 == 0) f = 11'($urandom);
      #1;
      exp = '0;
      if (count_pulse && a) exp[0] = 1;
      for (int k = 1; k < 11; k++) if (count_pulse && f[k]) exp[k] = 1;
      checks++;
      if (gated != exp) begin failures++; $display("FAIL f=%b a=%b gated=%b", f, a, gated); end
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
