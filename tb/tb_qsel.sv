// tb_qsel: exercises one Q-select element in the order a ring gives it:
// smpl (previous element's snext) samples the probe, req (previous
// element's fout) starts the test. Checks snext = req at once, that the
// output is tout for a sampled true probe and fout for false, that it
// appears 2*DLY after req, and that probe changes after the sample are
// ignored.
module tb_qsel;
  int checks = 0, failures = 0;
  logic req, probe, smpl, clr_n, tout, fout, snext;
  int ntrue = 0, nfalse = 0;

  qsel #(.DLY(1)) dut (.req(req), .probe(probe), .smpl(smpl), .clr_n(clr_n),
                       .tout(tout), .fout(fout), .snext(snext));

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
    req = 0; smpl = 0; probe = 0; clr_n = 0; #5;
    check(tout == 0 && fout == 0, "clear forces outputs low");
    clr_n = 1; #5;
    for (int n = 0; n < 400; n++) begin
      logic pv, t0, f0;
      time tr;
      pv = $urandom_range(0, 1);
      probe = pv;
      #1;
      smpl = ~smpl;              // sample
      #($urandom_range(1, 4));
      probe = $urandom_range(0, 1); // changes after the sample must not matter
      t0 = tout; f0 = fout;
      req = ~req;
      tr = $time;
      #0;
      check(snext == req, "snext follows req");
      wait ((tout != t0) || (fout != f0));
      check($time - tr == 2, $sformatf("test %0d took %0t", n, $time - tr));
      if (pv) begin
        check(tout != t0 && fout == f0, $sformatf("test %0d: sampled true -> tout", n));
        ntrue++;
      end else begin
        check(fout != f0 && tout == t0, $sformatf("test %0d: sampled false -> fout", n));
        nfalse++;
      end
      #($urandom_range(1, 4));
    end
    check(ntrue > 100 && nfalse > 100, "both outcomes seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
