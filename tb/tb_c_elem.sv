// tb_c_elem: checks the six C-element variants (no inversion, inversion on
// A, inversion on B, each with and without clear) against a reference
// model of the C-element rule: output follows the inputs when they agree,
// holds otherwise, and is forced low by clear. Random input sequences.
module tb_c_elem;
  int checks = 0, failures = 0;
  logic a, b, clr_n;
  logic [5:0] q;
  bit   [5:0] ref_q;
  localparam bit IA [6] = '{0, 1, 0, 0, 1, 0};
  localparam bit IB [6] = '{0, 0, 1, 0, 0, 1};
  localparam bit HC [6] = '{0, 0, 0, 1, 1, 1};

  for (genvar v = 0; v < 6; v++) begin : g_dut
    c_elem #(.INV_A(IA[v]), .INV_B(IB[v]), .HAS_CLR(HC[v])) dut (
      .a(a), .b(b), .clr_n(clr_n), .q(q[v]));
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  function automatic void ref_step();
    for (int v = 0; v < 6; v++) begin
      bit ai = a ^ IA[v], bi = b ^ IB[v];
      if (HC[v] && !clr_n) ref_q[v] = 1'b0;
      else if (ai == bi)   ref_q[v] = ai;
    end
  endfunction

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int holds = 0;
    // Bring each variant to a known state with inputs that agree for it.
    clr_n = 0; a = 0; b = 0; #2; ref_step();
    clr_n = 1; #2; ref_step();
    for (int v = 0; v < 6; v++) begin
      a = IA[v]; b = IB[v]; #2; ref_step();  // both effective inputs 0 for variant v
      check(q[v] == 1'b0, $sformatf("variant %0d low after agreeing zeros", v));
      a = ~IA[v]; b = ~IB[v]; #2; ref_step();
      check(q[v] == 1'b1, $sformatf("variant %0d high after agreeing ones", v));
    end
    for (int n = 0; n < 2000; n++) begin
      a = $urandom_range(0, 1);
      b = $urandom_range(0, 1);
      clr_n = ($urandom_range(0, 15) != 0);
      #2;
      ref_step();
      for (int v = 0; v < 6; v++) begin
        check(q[v] == ref_q[v], $sformatf("step %0d variant %0d a=%0b b=%0b clr_n=%0b q=%0b exp=%0b",
                                          n, v, a, b, clr_n, q[v], ref_q[v]));
        if ((a ^ IA[v]) != (b ^ IB[v])) holds++;
      end
    end
    check(holds > 100, "hold state exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
