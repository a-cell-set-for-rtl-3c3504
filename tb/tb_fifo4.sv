// tb_fifo4: streams random words through the four-word FIFO with a two-phase
// sender and receiver that each wait a random time between events. Checks
// that words come out in order and unchanged, that the buffer fills to
// exactly 4 word(s) while the receiver is slow (the sender then stalls:
// its request is not acknowledged), and that a word offered to an empty
// buffer reaches the output after one C-element delay per stage.
module tb_fifo4;
  localparam int DEPTH = 4;
  localparam int NWORDS = 3000;
  int checks = 0, failures = 0;
  logic       rin, ain, rout, aout, clr_n;
  logic [7:0] d, q;
  logic [7:0] sent [$];
  int nsent = 0, nrecv = 0, max_occ = 0, stalls = 0, fast_through = 0;
  bit slow_phase;

  fifo4 dut (.rin(rin), .ain(ain), .d(d), .rout(rout), .aout(aout), .clr_n(clr_n), .q(q));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Sender.
  initial begin
    rin = 0; d = 0; clr_n = 0;
    #5 clr_n = 1;
    #5;
    for (int n = 0; n < NWORDS; n++) begin
      bit was_empty;
      d = 8'($urandom);
      #1;
      was_empty = (nsent == nrecv);
      sent.push_back(d);
      rin = ~rin;
      #2;
      if (ain != rin) stalls++;  // not acknowledged within a cell delay
      wait (ain == rin);
      // ain is the first stage's output; an empty buffer presents the word
      // one C-element delay per stage after the request.
      if (was_empty && !slow_phase) begin
        #(DEPTH);
        if (rout != aout && q == d) fast_through++;
      end
      nsent++;
      if (nsent - nrecv > max_occ) max_occ = nsent - nrecv;
      #(slow_phase ? 1 : $urandom_range(1, 6));
    end
  end

  // Receiver: alternates fast and slow phases so the buffer both drains and
  // fills.
  initial begin
    aout = 0;
    slow_phase = 0;
    #12;
    while (nrecv < NWORDS) begin
      logic [7:0] exp_d;
      slow_phase = ((nrecv / 200) % 2) == 1;
      wait (rout != aout);
      #1;
      exp_d = sent.pop_front();
      check(q == exp_d, $sformatf("word %0d: got %02h expected %02h", nrecv, q, exp_d));
      #(slow_phase ? $urandom_range(10, 30) : $urandom_range(1, 6));
      nrecv++;
      aout = ~aout;
    end
    #20;
    check(max_occ == DEPTH, $sformatf("buffer filled to %0d words (expected %0d)", max_occ, DEPTH));
    check(stalls > 0, "sender stalled on a full buffer");
    check(fast_through > 0, "word ripples through an empty buffer");
    $display("words=%0d max_occupancy=%0d stalls=%0d pass_through=%0d", nrecv, max_occ, stalls, fast_through);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
