// tb_qsel_loop3: runs the three-element Q-select polling loop. Each round
// clears the loop, sets the guards, and starts it. With some guard true the
// first true guard in ring order (element 2, 3, then 1) must receive the
// process request, at the cycle count the element delays give; with none
// true the loop must keep circulating until a guard is raised, then serve
// that one. The process acknowledge must come back on ack, and no other
// process may be started.
module tb_qsel_loop3;
  int checks = 0, failures = 0;
  logic       req, clr_n, ack;
  logic [2:0] probe, preq, pack;
  int served [3];
  int waited = 0;

  qsel_loop3 #(.DLY(1)) dut (.req(req), .probe(probe), .clr_n(clr_n),
                             .preq(preq), .pack(pack), .ack(ack));

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

  // Position of element k in the checking order after a start.
  function automatic int order_pos(int k);
    return (k == 1) ? 0 : (k == 2) ? 1 : 2;
  endfunction

  initial begin
    for (int round = 0; round < 60; round++) begin
      int exp_k;
      logic [2:0] p0;
      time t0;
      req = 0; pack = 0; clr_n = 0; probe = 0; #8;
      check(preq == 0 && ack == 0, "clear: all low");
      clr_n = 1; #2;
      probe = (round % 4 == 3) ? 3'b000 : 3'($urandom_range(1, 7));
      exp_k = -1;
      for (int s = 0; s < 3; s++) begin
        int k;
        k = (s == 0) ? 1 : (s == 1) ? 2 : 0;
        if (exp_k < 0 && probe[k]) exp_k = k;
      end
      #1;  // guards settle before the start (sampling is immediate)
      p0 = preq;
      req = 1;
      t0 = $time;
      if (exp_k < 0) begin
        // Nothing ready: the loop must keep polling without starting anyone.
        #($urandom_range(20, 60));
        check(preq == p0, "no process started while no guard is true");
        exp_k = $urandom_range(0, 2);
        probe[exp_k] = 1;
        waited++;
        wait (preq != p0);
      end else begin
        wait (preq != p0);
        // init: 1 unit, then 2 units per element tested.
        check($time - t0 == 1 + 2 * (order_pos(exp_k) + 1),
              $sformatf("round %0d: process %0d started after %0t", round, exp_k, $time - t0));
      end
      check(preq == (p0 ^ (3'b1 << exp_k)), $sformatf("round %0d: only process %0d started (preq=%b probe=%b)",
                                                      round, exp_k, preq, probe));
      served[exp_k]++;
      #3;
      pack[exp_k] = ~pack[exp_k];
      #1;
      check(ack == 1, "process acknowledge reaches ack");
      #20;
      check(preq == (p0 ^ (3'b1 << exp_k)), "loop stops after serving");
      // Lower the guards, then return the start wire low: that starts one
      // more pass, which finds nothing and keeps polling until the clear.
      probe = 0; #1;
      req = 0; #20;
    end
    for (int k = 0; k < 3; k++) check(served[k] > 5, $sformatf("process %0d served", k));
    check(waited > 5, "idle polling exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
