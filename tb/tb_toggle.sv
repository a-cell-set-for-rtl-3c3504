// tb_toggle: checks that input transitions leave alternately on out0 and
// out1, the first one after clear on out0, over repeated clears.
module tb_toggle;
  int checks = 0, failures = 0;
  logic tin, clr_n, out0, out1;

  toggle dut (.tin(tin), .clr_n(clr_n), .out0(out0), .out1(out1));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int round = 0; round < 5; round++) begin
      int len;
      tin = 0; clr_n = 0; #2;
      check(out0 == 0 && out1 == 0, "clear forces outputs low");
      clr_n = 1; #1;
      len = $urandom_range(20, 200);
      for (int n = 0; n < len; n++) begin
        logic o0, o1;
        o0 = out0; o1 = out1;
        tin = ~tin;
        #($urandom_range(1, 3));
        if (n % 2 == 0) check(out0 == ~o0 && out1 == o1, $sformatf("round %0d event %0d to out0", round, n));
        else            check(out1 == ~o1 && out0 == o0, $sformatf("round %0d event %0d to out1", round, n));
      end
      // End with tin low so the next clear meets the cell's rule.
      if (tin) begin tin = 0; #2; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
