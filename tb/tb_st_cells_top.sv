// tb_st_cells_top: end-to-end test of the whole cell set at its default
// sizes. All groups run at once, each driven through its own two-phase or
// four-phase handshakes, and each result is compared with a model written
// here:
//   * Call modules: random callers; the shared channel must be called once
//     per request and only the caller that asked may be acknowledged.
//   * Toggle: input transitions must alternate between the two outputs.
//   * Q-select ring (run first, as it is cleared before every start):
//     random guards; the first true guard in polling order must be started
//     at the expected time, with idle polling while no guard is true.
//   * Carry-completion adder, incrementer and decrementer: random operands,
//     sum and carry checked after completion and reset in the return phase.
//   * FIFO: 600 random words with bursts of slow reading; order, filling to
//     four words, sender stalls and ripple-through of an empty buffer.
//   * Mesh element: random packets into the processor, X and Y inputs,
//     checked at the X, Y and processor outputs by the X-then-Y rule.
// Every mechanism named above is counted and must occur at least once.
module tb_st_cells_top;
  import router_pkg::*;
  int checks = 0, failures = 0;

  logic clr_n;
  logic [2:0] c3_r, c3_a; logic c3_rs, c3_as;
  logic [3:0] c4_r, c4_a; logic c4_rs, c4_as;
  logic tog_in, tog_out0, tog_out1;
  logic ql_req, ql_ack; logic [2:0] ql_probe, ql_preq, ql_pack;
  logic [3:0] add_a, add_b, add_sum; logic add_cin, add_din, add_en, add_cout, add_dout, add_ack;
  logic [3:0] inc_in, inc_sum; logic inc_cin, inc_din, inc_en, inc_cout, inc_dout;
  logic [3:0] dec_in, dec_sum; logic dec_cin, dec_din, dec_en, dec_cout, dec_dout;
  logic fifo_rin, fifo_ain, fifo_rout, fifo_aout; logic [7:0] fifo_d, fifo_q;
  logic  mesh_init;
  logic  [2:0] in_req, in_ack;     // 0 = P, 1 = X, 2 = Y
  word_t in_w [3];
  logic  [2:0] out_req, out_ack;   // 0 = X, 1 = Y, 2 = P
  word_t out_w [3];

  st_cells_top dut (
    .clr_n(clr_n),
    .lib_c3_r(c3_r), .lib_c3_a(c3_a), .lib_c3_rs(c3_rs), .lib_c3_as(c3_as),
    .lib_c4_r(c4_r), .lib_c4_a(c4_a), .lib_c4_rs(c4_rs), .lib_c4_as(c4_as),
    .lib_tog_in(tog_in), .lib_tog_out0(tog_out0), .lib_tog_out1(tog_out1),
    .lib_ql_req(ql_req), .lib_ql_probe(ql_probe), .lib_ql_preq(ql_preq),
    .lib_ql_pack(ql_pack), .lib_ql_ack(ql_ack),
    .lib_add_a(add_a), .lib_add_b(add_b), .lib_add_cin(add_cin), .lib_add_din(add_din),
    .lib_add_en(add_en), .lib_add_sum(add_sum), .lib_add_cout(add_cout),
    .lib_add_dout(add_dout), .lib_add_ack(add_ack),
    .lib_inc_in(inc_in), .lib_inc_cin(inc_cin), .lib_inc_din(inc_din), .lib_inc_en(inc_en),
    .lib_inc_sum(inc_sum), .lib_inc_cout(inc_cout), .lib_inc_dout(inc_dout),
    .lib_dec_in(dec_in), .lib_dec_cin(dec_cin), .lib_dec_din(dec_din), .lib_dec_en(dec_en),
    .lib_dec_sum(dec_sum), .lib_dec_cout(dec_cout), .lib_dec_dout(dec_dout),
    .fifo_rin(fifo_rin), .fifo_ain(fifo_ain), .fifo_d(fifo_d),
    .fifo_rout(fifo_rout), .fifo_aout(fifo_aout), .fifo_q(fifo_q),
    .mesh_init(mesh_init),
    .mesh_pin_req(in_req[0]), .mesh_pin_ack(in_ack[0]), .mesh_pin(in_w[0]),
    .mesh_xin_req(in_req[1]), .mesh_xin_ack(in_ack[1]), .mesh_xin(in_w[1]),
    .mesh_yin_req(in_req[2]), .mesh_yin_ack(in_ack[2]), .mesh_yin(in_w[2]),
    .mesh_xout_req(out_req[0]), .mesh_xout_ack(out_ack[0]), .mesh_xout(out_w[0]),
    .mesh_yout_req(out_req[1]), .mesh_yout_ack(out_ack[1]), .mesh_yout(out_w[1]),
    .mesh_pout_req(out_req[2]), .mesh_pout_ack(out_ack[2]), .mesh_pout(out_w[2]));

  // Mechanism counters.
  int n_call3 [3], n_call4 [4];
  int n_tog = 0, n_ql_start [3], n_ql_idle = 0;
  int n_add = 0, n_add_carry = 0, n_inc = 0, n_inc_wrap = 0, n_dec = 0, n_dec_borrow = 0;
  int n_fifo_words = 0, n_fifo_full = 0, n_fifo_stall = 0, n_fifo_ripple = 0;
  int n_mesh_out [3], n_mesh_concurrent = 0, n_mesh_stall = 0;
  int groups_done = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- Calls
  task automatic run_calls();
    for (int n = 0; n < 200; n++) begin
      int k, j;
      logic [2:0] a3;
      logic [3:0] a4;
      logic rs3, rs4;
      k = $urandom_range(0, 2);
      j = $urandom_range(0, 3);
      a3 = c3_a; a4 = c4_a; rs3 = c3_rs; rs4 = c4_rs;
      c3_r[k] = ~c3_r[k];
      c4_r[j] = ~c4_r[j];
      #10;
      check(c3_rs != rs3 && c3_a == a3, "call3a: caller's request reaches the shared channel only");
      check(c4_rs != rs4 && c4_a == a4, "call4: caller's request reaches the shared channel only");
      c3_as = ~c3_as;
      c4_as = ~c4_as;
      #10;
      check(c3_a == (a3 ^ (3'b1 << k)), $sformatf("call3a: only caller %0d acknowledged", k));
      check(c4_a == (a4 ^ (4'b1 << j)), $sformatf("call4: only caller %0d acknowledged", j));
      n_call3[k]++;
      n_call4[j]++;
    end
  endtask

  // --------------------------------------------------------------- Toggle
  task automatic run_toggle();
    for (int n = 0; n < 100; n++) begin
      logic o0, o1;
      o0 = tog_out0; o1 = tog_out1;
      tog_in = ~tog_in;
      #5;
      if (tog_in) check(tog_out0 != o0 && tog_out1 == o1, "toggle: rising input moves out0");
      else        check(tog_out1 != o1 && tog_out0 == o0, "toggle: falling input moves out1");
      n_tog++;
    end
  endtask

  // ------------------------------------------------------- Q-select ring
  // A start transition on the ring's request begins polling: elements are
  // tested in the order 1, 2, 0 and the first whose guard is true starts its
  // process; while none is, the ring keeps polling. The ring is cleared
  // before each start (the shared clear, so this runs before the other
  // groups). Each start is checked for the process started and its time.
  task automatic run_qsel();
    for (int n = 0; n < 40; n++) begin
      int exp_k, pos;
      logic [2:0] p0;
      time t0;
      bit idle;
      ql_req = 0; ql_pack = 0; ql_probe = 0; clr_n = 0; #8;
      check(ql_preq == 0 && ql_ack == 0, "q-select: clear sets all wires low");
      clr_n = 1; #2;
      idle = (n % 4 == 1);
      ql_probe = idle ? 3'b000 : 3'($urandom_range(1, 7));
      #1;
      p0 = ql_preq;
      ql_req = 1;
      t0 = $time;
      if (idle) begin
        #($urandom_range(20, 60));
        check(ql_preq == p0, "q-select: nothing started while no guard is true");
        exp_k = $urandom_range(0, 2);
        ql_probe[exp_k] = 1;
        n_ql_idle++;
        wait (ql_preq != p0);
      end else begin
        exp_k = ql_probe[1] ? 1 : ql_probe[2] ? 2 : 0;
        pos = (exp_k == 1) ? 0 : (exp_k == 2) ? 1 : 2;
        wait (ql_preq != p0);
        // One buffer delay for the start, then two per element tested.
        check($time - t0 == 1 + 2 * (pos + 1), $sformatf("q-select: start latency %0t", $time - t0));
      end
      check(ql_preq == (p0 ^ (3'b1 << exp_k)),
            $sformatf("q-select pass %0d: process %0d started (preq=%b)", n, exp_k, ql_preq ^ p0));
      n_ql_start[exp_k]++;
      #3;
      ql_pack[exp_k] = ~ql_pack[exp_k];
      #1;
      check(ql_ack == 1, "q-select: process acknowledge reaches the ring's acknowledge");
      #20;
      check(ql_preq == (p0 ^ (3'b1 << exp_k)), "q-select: ring stops after starting one process");
      ql_probe = 0; #1;
      ql_req = 0; #20;
    end
    clr_n = 0; #8;
  endtask

  // ------------------------------------------- Carry-completion data paths
  task automatic run_arith();
    for (int n = 0; n < 200; n++) begin
      logic [4:0] r;
      {add_cin, add_a, add_b} = 9'($urandom);
      add_din = ~add_cin;
      {inc_cin, inc_in} = 5'($urandom);
      inc_din = ~inc_cin;
      {dec_cin, dec_in} = 5'($urandom);
      dec_din = ~dec_cin;
      #1;
      add_en = 1; inc_en = 1; dec_en = 1;
      wait (add_ack && (inc_cout || inc_dout) && (dec_cout || dec_dout));
      #1;
      r = 5'(add_a) + 5'(add_b) + 5'(add_cin);
      check(add_sum == r[3:0] && add_cout == r[4] && add_dout == !r[4],
            $sformatf("adder %0d+%0d+%0d", add_a, add_b, add_cin));
      n_add++;
      if (r[4]) n_add_carry++;
      r = 5'(inc_in) + 5'(inc_cin);
      check(inc_sum == r[3:0] && inc_cout == r[4] && inc_dout == !r[4],
            $sformatf("incrementer %0d+%0d", inc_in, inc_cin));
      n_inc++;
      if (r[4]) n_inc_wrap++;
      r = 5'(dec_in) + 5'(dec_cin) + 5'd15;
      check(dec_sum == r[3:0] && dec_cout == r[4] && dec_dout == !r[4],
            $sformatf("decrementer %0d+%0d-1", dec_in, dec_cin));
      n_dec++;
      if (!r[4]) n_dec_borrow++;
      add_en = 0; inc_en = 0; dec_en = 0;
      wait (!add_ack);
      #1;
      check(!add_cout && !add_dout && !inc_cout && !inc_dout && !dec_cout && !dec_dout,
            "return phase clears the carry wires");
    end
  endtask

  // ----------------------------------------------------------------- FIFO
  logic [7:0] fifo_sent [$];
  localparam int FIFO_WORDS = 600;
  bit fifo_slow;
  int fifo_nsent = 0;

  task automatic fifo_send();
    for (int n = 0; n < FIFO_WORDS; n++) begin
      bit was_empty;
      fifo_d = 8'($urandom);
      #1;
      was_empty = (fifo_nsent == n_fifo_words);
      fifo_sent.push_back(fifo_d);
      fifo_rin = ~fifo_rin;
      #2;
      if (fifo_ain != fifo_rin) n_fifo_stall++;
      wait (fifo_ain == fifo_rin);
      if (was_empty && !fifo_slow) begin
        #4;
        if (fifo_rout != fifo_aout && fifo_q == fifo_d) n_fifo_ripple++;
      end
      fifo_nsent++;
      if (fifo_nsent - n_fifo_words == 4) n_fifo_full++;
      check(fifo_nsent - n_fifo_words <= 4, "fifo holds at most four words");
      #(fifo_slow ? 1 : $urandom_range(1, 6));
    end
  endtask

  task automatic fifo_receive();
    while (n_fifo_words < FIFO_WORDS) begin
      logic [7:0] e;
      fifo_slow = ((n_fifo_words / 100) % 2) == 1;
      wait (fifo_rout != fifo_aout);
      #1;
      e = fifo_sent.pop_front();
      check(fifo_q == e, $sformatf("fifo word %0d: got %02h expected %02h", n_fifo_words, fifo_q, e));
      #(fifo_slow ? $urandom_range(10, 30) : $urandom_range(1, 6));
      n_fifo_words++;
      fifo_aout = ~fifo_aout;
    end
  endtask

  // ----------------------------------------------------------------- Mesh
  typedef word_t pkt_t [$];
  localparam int MESH_PKTS = 60;
  pkt_t mesh_exp [3][3][$];        // [output][input]
  bit   mesh_in_pkt [3];
  int   mesh_sent [3];

  function automatic int route(pkt_t p, bit from_y, output pkt_t e);
    e = p;
    if (!from_y) begin
      if (e[0][FIELD_W-1:0] != 1) begin
        e[0] = {1'b0, e[0][FIELD_W-1:0] - 4'd1};
        return 0;
      end
      void'(e.pop_front());
    end
    if (e[0][FIELD_W-1:0] != 1) begin
      e[0] = {1'b0, e[0][FIELD_W-1:0] - 4'd1};
      return 1;
    end
    void'(e.pop_front());
    return 2;
  endfunction

  task automatic mesh_send(int ch);
    #($urandom_range(5, 40));
    for (int n = 0; n < MESH_PKTS; n++) begin
      pkt_t p, e;
      int o, len;
      len = $urandom_range(1, 3);
      if (ch != 2) p.push_back({1'b0, 4'(($urandom_range(0, 1) != 0) ? 1 : $urandom_range(0, 15))});
      p.push_back({1'b0, 4'(($urandom_range(0, 1) != 0) ? 1 : $urandom_range(0, 15))});
      for (int i = 0; i < len; i++)
        p.push_back({(i == len - 1), (i == 0) ? {2'(ch), 2'(n)} : 4'($urandom)});
      o = route(p, ch == 2, e);
      mesh_exp[o][ch].push_back(e);
      foreach (p[i]) begin
        in_w[ch] = p[i];
        #1;
        in_req[ch] = ~in_req[ch];
        wait (in_ack[ch] == in_req[ch]);
        #($urandom_range(0, 3));
      end
      if ($urandom_range(0, 9) == 0) #($urandom_range(20, 80));
    end
    mesh_sent[ch] = 1;
  endtask

  task automatic mesh_receive(int o);
    pkt_t cur;
    forever begin
      word_t w;
      wait (out_req[o] != out_ack[o]);
      #1;
      w = out_w[o];
      if ((o == 0 && mesh_in_pkt[1]) || (o == 1 && mesh_in_pkt[0])) n_mesh_concurrent++;
      mesh_in_pkt[o] = 1;
      cur.push_back(w);
      if (w[TAG_BIT]) begin
        bit matched = 0;
        for (int ch = 0; ch < 3 && !matched; ch++)
          if (mesh_exp[o][ch].size() > 0 && mesh_exp[o][ch][0] == cur) begin
            void'(mesh_exp[o][ch].pop_front());
            matched = 1;
          end
        check(matched, $sformatf("mesh output %0d: packet %p is the next one expected", o, cur));
        n_mesh_out[o]++;
        mesh_in_pkt[o] = 0;
        cur.delete();
      end
      if ($urandom_range(0, 7) == 0) begin
        #($urandom_range(10, 40));
        n_mesh_stall++;
      end else begin
        #($urandom_range(0, 3));
      end
      out_ack[o] = ~out_ack[o];
    end
  endtask

  // ------------------------------------------------------------- Sequence
  initial begin
    clr_n = 0;
    c3_r = 0; c3_as = 0; c4_r = 0; c4_as = 0; tog_in = 0;
    ql_req = 0; ql_probe = 0; ql_pack = 0;
    add_a = 0; add_b = 0; add_cin = 0; add_din = 0; add_en = 0;
    inc_in = 0; inc_cin = 0; inc_din = 0; inc_en = 0;
    dec_in = 0; dec_cin = 0; dec_din = 0; dec_en = 0;
    fifo_rin = 0; fifo_d = 0; fifo_aout = 0; fifo_slow = 0;
    mesh_init = 0; in_req = 0; out_ack = 0;
    for (int i = 0; i < 3; i++) in_w[i] = '0;
    #10;
    run_qsel();
    clr_n = 1;
    #2  mesh_init = 1;
    #2;
    fork
      begin run_calls();  groups_done++; end
      begin run_toggle(); groups_done++; end
      begin run_arith();  groups_done++; end
      begin fork fifo_send(); fifo_receive(); join groups_done++; end
      begin fork mesh_send(0); mesh_send(1); mesh_send(2); join groups_done++; end
      mesh_receive(0);
      mesh_receive(1);
      mesh_receive(2);
    join_none
    wait (groups_done == 5);
    #500;
    for (int o = 0; o < 3; o++)
      for (int ch = 0; ch < 3; ch++)
        check(mesh_exp[o][ch].size() == 0,
              $sformatf("mesh output %0d: everything from input %0d delivered", o, ch));
    for (int k = 0; k < 3; k++) check(n_call3[k] > 0, $sformatf("call3a caller %0d served", k));
    for (int k = 0; k < 4; k++) check(n_call4[k] > 0, $sformatf("call4 caller %0d served", k));
    check(n_tog > 0, "toggle alternation");
    for (int k = 0; k < 3; k++) check(n_ql_start[k] > 0, $sformatf("q-select started process %0d", k));
    check(n_ql_idle > 0, "q-select idle polling");
    check(n_add_carry > 0 && n_add > n_add_carry, "adder with and without carry out");
    check(n_inc_wrap > 0 && n_inc > n_inc_wrap, "incrementer with and without wrap");
    check(n_dec_borrow > 0 && n_dec > n_dec_borrow, "decrementer with and without borrow");
    check(n_fifo_full > 0, "fifo filled");
    check(n_fifo_stall > 0, "fifo sender stalled");
    check(n_fifo_ripple > 0, "fifo ripple-through when empty");
    check(n_mesh_out[0] > 0, "mesh: packets continued along X");
    check(n_mesh_out[1] > 0, "mesh: packets turned or continued along Y");
    check(n_mesh_out[2] > 0, "mesh: packets delivered to the processor");
    check(n_mesh_concurrent > 0, "mesh: X and Y routing different packets at once");
    check(n_mesh_stall > 0, "mesh: output stalls");
    $display("calls3=%p calls4=%p toggles=%0d qsel=%p idle=%0d", n_call3, n_call4, n_tog, n_ql_start, n_ql_idle);
    $display("add=%0d carry=%0d inc=%0d wrap=%0d dec=%0d borrow=%0d", n_add, n_add_carry, n_inc, n_inc_wrap,
             n_dec, n_dec_borrow);
    $display("fifo words=%0d full=%0d stalls=%0d ripple=%0d", n_fifo_words, n_fifo_full, n_fifo_stall,
             n_fifo_ripple);
    $display("mesh x=%0d y=%0d p=%0d concurrent=%0d stalls=%0d", n_mesh_out[0], n_mesh_out[1], n_mesh_out[2],
             n_mesh_concurrent, n_mesh_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
