// tb_ccs_incr_bit: exhaustive check of the carry-completion increment bit:
// the sum and the carry pair must equal the arithmetic result whenever an
// incoming carry wire is high; with no incoming carry wire high, a bit
// whose value alone decides its carry must already report it; with en low
// both carry wires are low.
module tb_ccs_incr_bit;
  localparam bit DECR = 0;
  int checks = 0, failures = 0;
  logic v, cin, din, en, sum, cout, dout;

  ccs_incr_bit dut (.din_v(v), .cin(cin), .din(din), .en(en), .sum(sum), .cout(cout), .dout(dout));

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
    for (int i = 0; i < 16; i++) begin
      {en, cin, din, v} = 4'(i);
      #1;
      if (!en) begin
        check(cout == 0 && dout == 0, "en low: carries low");
      end else if (cin ^ din) begin
        logic [1:0] r;
        // Incrementer adds the carry to v; decrementer adds 1 and the carry.
        r = 2'(v) + 2'(cin) + 2'(DECR);
        check(sum == r[0], $sformatf("v=%b cin=%b: sum", v, cin));
        check(cout == r[1] && dout == !r[1], $sformatf("v=%b cin=%b: carry pair %b%b", v, cin, cout, dout));
      end else if (!cin && !din) begin
        // Decided early: incrementer bit holding 0 never carries, decrementer
        // bit holding 1 always carries.
        if (!DECR && !v) check(dout == 1 && cout == 0, "incr bit 0 decides don't-carry early");
        else if (DECR && v) check(cout == 1 && dout == 0, "decr bit 1 decides carry early");
        else check(cout == 0 && dout == 0, "undecided bit waits");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
