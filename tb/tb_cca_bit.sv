// tb_cca_bit: exhaustive check of the carry-completion adder bit against
// its truth table: with en high, carry/don't-carry are decided at once when
// the operands are equal and follow the incoming carry wire otherwise; the
// sum is checked wherever the table defines it; with en low both carry
// wires are low.
module tb_cca_bit;
  int checks = 0, failures = 0;
  logic a, b, cin, din, en, sum, cout, dout;

  cca_bit dut (.a(a), .b(b), .cin(cin), .din(din), .en(en), .sum(sum), .cout(cout), .dout(dout));

  // Truth table rows for en = 1, indexed {cin, din, a, b} (cin = din = 1 is
  // not allowed). Entries: {sum defined, sum, cout, dout}.
  localparam logic [3:0] TT [12] = '{
    4'b0_0_0_1, 4'b0_0_0_0, 4'b0_0_0_0, 4'b0_0_1_0,   // cin=0 din=0
    4'b1_0_0_1, 4'b1_1_0_1, 4'b1_1_0_1, 4'b1_0_1_0,   // cin=0 din=1
    4'b1_1_0_1, 4'b1_0_1_0, 4'b1_0_1_0, 4'b1_1_1_0};  // cin=1 din=0

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
    for (int i = 0; i < 32; i++) begin
      {en, cin, din, a, b} = 5'(i);
      #1;
      if (!en) begin
        check(cout == 0 && dout == 0, $sformatf("en=0 case %0d: carries low", i));
      end else if (!(cin && din)) begin
        logic [3:0] row;
        row = TT[{cin, din, a, b}];
        check(cout == row[1] && dout == row[0], $sformatf("case %b%b%b%b: cout=%b dout=%b", cin, din, a, b, cout, dout));
        if (row[3]) check(sum == row[2], $sformatf("case %b%b%b%b: sum=%b", cin, din, a, b, sum));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
