// tb_tselect: steers random input transitions with a random bundled sel
// (changed only between transitions) and checks that exactly the selected
// output toggles; also checks that clear forces both outputs low.
module tb_tselect;
  int checks = 0, failures = 0;
  logic tin, sel, clr_n, outt, outf;
  int nt = 0, nf = 0;

  tselect dut (.tin(tin), .sel(sel), .clr_n(clr_n), .outt(outt), .outf(outf));

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
    for (int round = 0; round < 3; round++) begin
      tin = 0; sel = 0; clr_n = 0; #2;
      check(outt == 0 && outf == 0, "clear forces outputs low");
      clr_n = 1; #1;
      for (int n = 0; n < 500; n++) begin
        logic t0, f0;
        sel = $urandom_range(0, 1);
        #1;
        t0 = outt; f0 = outf;
        tin = ~tin;
        #1;
        if (sel) begin
          check(outt == ~t0 && outf == f0, $sformatf("sel=1 step %0d", n));
          nt++;
        end else begin
          check(outf == ~f0 && outt == t0, $sformatf("sel=0 step %0d", n));
          nf++;
        end
      end
    end
    check(nt > 100 && nf > 100, "both outputs used");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
