// tb_cca4: runs the four-bit carry-completion adder through full four-phase
// cycles (raise en, wait for ack, check the sum and the carry pair, lower
// en, wait for ack low, check the carry wires reset) for every operand pair
// with carry in 0 and 1, and checks that ack stays low while en is low.
module tb_cca4;
  int checks = 0, failures = 0;
  logic [3:0] a, b, sum;
  logic cin, din, en, cout, dout, ack;
  int cycles = 0;

  cca4 dut (.a(a), .b(b), .cin(cin), .din(din), .en(en), .sum(sum), .cout(cout), .dout(dout), .ack(ack));

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
    en = 0; a = 0; b = 0; cin = 0; din = 0;
    #2;
    for (int i = 0; i < 512; i++) begin
      logic [4:0] exp_v;
      {cin, a, b} = 9'(i);
      din = ~cin;
      #1;
      check(ack == 0 && cout == 0 && dout == 0, "idle: ack and carries low");
      en = 1;
      wait (ack == 1);
      #1;
      exp_v = 5'(a) + 5'(b) + 5'(cin);
      check(sum == exp_v[3:0], $sformatf("%0d+%0d+%0d: sum=%0d", a, b, cin, sum));
      check(cout == exp_v[4] && dout == !exp_v[4], $sformatf("%0d+%0d+%0d: carry pair %b%b", a, b, cin, cout, dout));
      en = 0;
      wait (ack == 0);
      #1;
      check(cout == 0 && dout == 0, "reset phase pulls carries low");
      cycles++;
    end
    check(cycles == 512, "all four-phase cycles completed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
