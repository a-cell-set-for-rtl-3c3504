// tb_call3a: drives the 3-client Call with random, mutually exclusive client
// requests and a subroutine that answers after a random wait. Checks that
// each request toggles rs at once, that no client is acknowledged before
// the subroutine answers, and that the answer goes back to the caller only.
module tb_call3a;
  localparam int N = 3;
  int checks = 0, failures = 0;
  logic [N-1:0] r, a;
  logic rs, as_i;
  int calls [N];

  call3a dut (.r1(r[0]), .a1(a[0]), .r2(r[1]), .a2(a[1]), .r3(r[2]), .a3(a[2]), .rs(rs), .as_i(as_i));

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
    r = '0; as_i = 0;
    #5;
    check(a == '0 && rs == 1'b0, "all low after initialisation");
    for (int n = 0; n < 600; n++) begin
      int k;
      logic rs0;
      logic [N-1:0] a0;
      k = $urandom_range(0, N - 1);
      rs0 = rs; a0 = a;
      r[k] = ~r[k];
      #1;
      check(rs == ~rs0, $sformatf("call %0d: rs follows request of client %0d", n, k));
      #($urandom_range(1, 5));
      check(a == a0, $sformatf("call %0d: no acknowledge before subroutine", n));
      as_i = ~as_i;
      #10;  // acknowledge passes one C-element delay per Call level
      check(a == (a0 ^ (N'(1) << k)), $sformatf("call %0d: acknowledge to client %0d only (a=%b)", n, k, a));
      calls[k]++;
      #($urandom_range(0, 3));
    end
    for (int k = 0; k < N; k++) check(calls[k] > 50, $sformatf("client %0d served", k));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
