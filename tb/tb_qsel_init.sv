// tb_qsel_init: checks the ring-starting Q-select. After clear an init
// transition must toggle snext at once and leave on fout one DLY later
// (the ring is started towards the next element); afterwards the element
// must test its sampled probe like a plain Q-select, 2*DLY after req.
module tb_qsel_init;
  int checks = 0, failures = 0;
  logic req, probe, smpl, init, clr_n, tout, fout, snext;
  int ntrue = 0, nfalse = 0;

  qsel_init #(.DLY(1)) dut (.req(req), .probe(probe), .smpl(smpl), .init(init), .clr_n(clr_n),
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
    for (int round = 0; round < 20; round++) begin
      time t0;
      req = 0; smpl = 0; init = 0; probe = 0; clr_n = 0; #5;
      check(tout == 0 && fout == 0 && snext == 0, "clear: outputs low");
      clr_n = 1; #2;
      probe = $urandom_range(0, 1);
      init = 1;
      t0 = $time;
      #0;
      check(snext == 1, "init toggles snext at once");
      wait (fout == 1 || tout == 1);
      check(fout == 1 && tout == 0, "init leaves on fout");
      check($time - t0 == 1, $sformatf("init to fout took %0t", $time - t0));
      for (int n = 0; n < 20; n++) begin
        logic pv, t1, f1, s1;
        time tr;
        pv = $urandom_range(0, 1);
        probe = pv; #1;
        smpl = ~smpl;
        #($urandom_range(1, 3));
        probe = ~pv;
        t1 = tout; f1 = fout; s1 = snext;
        req = ~req;
        tr = $time;
        #0;
        check(snext == ~s1, "req toggles snext");
        wait ((tout != t1) || (fout != f1));
        check($time - tr == 2, "req to output takes 2*DLY");
        if (pv) begin
          check(tout != t1 && fout == f1, "sampled true -> tout"); ntrue++;
        end else begin
          check(fout != f1 && tout == t1, "sampled false -> fout"); nfalse++;
        end
        #2;
      end
      // Bring every wire low again before the next clear.
      if (req) begin req = 0; #3; end
      if (smpl) begin smpl = 0; #1; end
      init = 0; #3;
    end
    check(ntrue > 50 && nfalse > 50, "both outcomes seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
