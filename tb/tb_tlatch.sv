// tb_tlatch: checks the three transition latch variants as eight-bit
// registers: normally transparent (passes while C = P), normally opaque
// (passes while C != P) and normally opaque with clear. Drives the
// two-phase capture/pass sequence each variant expects, then random C, P,
// D and clear, against a reference model.
module tb_tlatch;
  int checks = 0, failures = 0;
  logic [7:0] d;
  logic c, p, clr_n;
  logic [7:0] q_nt, q_no, q_mc;
  logic [7:0] r_nt, r_no, r_mc;

  tlatch #(.WIDTH(8), .OPAQUE(1'b0), .HAS_CLR(1'b0)) u_nt (.d(d), .c(c), .p(p), .clr_n(clr_n), .q(q_nt));
  tlatch #(.WIDTH(8), .OPAQUE(1'b1), .HAS_CLR(1'b0)) u_no (.d(d), .c(c), .p(p), .clr_n(clr_n), .q(q_no));
  tlatch #(.WIDTH(8), .OPAQUE(1'b1), .HAS_CLR(1'b1)) u_mc (.d(d), .c(c), .p(p), .clr_n(clr_n), .q(q_mc));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  function automatic void model();
    if (c == p) r_nt = d;
    if (c != p) r_no = d;
    if (!clr_n) r_mc = '0;
    else if (c != p) r_mc = d;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] held;
    c = 0; p = 0; clr_n = 0; d = 8'h00; #1;
    check(q_mc == 8'h00, "clear forces opaque-with-clear latch low");
    clr_n = 1;
    // Normally transparent: follows D until a C transition captures.
    d = 8'h5a; #1;
    check(q_nt == 8'h5a, "tlnt transparent after reset");
    c = ~c; #1;   // capture
    held = d;
    d = 8'ha5; #1;
    check(q_nt == held, "tlnt holds after capture");
    // The opaque forms opened on that C event (C != P) and follow D now.
    check(q_no == 8'ha5 && q_mc == 8'ha5, "tlno open while C != P");
    p = ~p; #1;   // pass
    check(q_nt == 8'ha5, "tlnt transparent again after pass");
    d = 8'h3c; #1;
    check(q_no == 8'ha5 && q_mc == 8'ha5, "tlno holds while C == P");
    // Random sequence against the model.
    r_nt = q_nt; r_no = q_no; r_mc = q_mc;
    for (int n = 0; n < 3000; n++) begin
      case ($urandom_range(0, 3))
        0: c = ~c;
        1: p = ~p;
        2: d = 8'($urandom);
        3: clr_n = ($urandom_range(0, 7) != 0);
      endcase
      #1;
      model();
      check(q_nt == r_nt, $sformatf("tlnt step %0d", n));
      check(q_no == r_no, $sformatf("tlno step %0d", n));
      check(q_mc == r_mc, $sformatf("tlno-mc step %0d", n));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
