// tb_delay_n: checks that the delay line output follows its input after
// N*UNIT time units, for the default two-buffer line and a five-buffer
// line with a unit of 3.
module tb_delay_n;
  int checks = 0, failures = 0;
  logic din;
  logic d2, d5;

  delay_n u_d2 (.din(din), .dout(d2));
  delay_n #(.N(5), .UNIT(3)) u_d5 (.din(din), .dout(d5));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    din = 0;
    #50;
    for (int n = 0; n < 20; n++) begin
      bit v;
      time t0, t2, t5;
      v = ~din;
      t0 = $time;
      din = v;
      fork
        begin wait (d2 == v); t2 = $time; end
        begin wait (d5 == v); t5 = $time; end
      join
      check(t2 - t0 == 2, $sformatf("2-stage line took %0t", t2 - t0));
      check(t5 - t0 == 15, $sformatf("5x3 line took %0t", t5 - t0));
      #10;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
