// tb_ccs_decr4: four-phase cycles of the four-bit carry-completion
// decrementer for every input value, started with each of the two carry
// wires. Completion is taken from the final carry pair. Checks the result,
// the carry out and the reset of the carry wires when en falls.
module tb_ccs_decr4;
  localparam bit DECR = 1;
  int checks = 0, failures = 0;
  logic [3:0] v, sum;
  logic cin, din, en, cout, dout;

  ccs_decr4 dut (.din_v(v), .cin(cin), .din(din), .en(en), .sum(sum), .cout(cout), .dout(dout));

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
    en = 0; v = 0; cin = 0; din = 0;
    #2;
    for (int i = 0; i < 32; i++) begin
      logic [4:0] r;
      {cin, v} = 5'(i);
      din = ~cin;
      #1;
      en = 1;
      wait (cout || dout);
      #1;
      r = 5'(v) + 5'(cin) + (DECR ? 5'd15 : 5'd0);
      check(sum == r[3:0], $sformatf("v=%0d cin=%0d: sum=%0d exp=%0d", v, cin, sum, r[3:0]));
      check(cout == r[4] && dout == !r[4], $sformatf("v=%0d cin=%0d: carry pair %b%b", v, cin, cout, dout));
      en = 0;
      #1;
      check(cout == 0 && dout == 0, "en low resets the carry wires");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
