// tb_router_macro: sends random packets into both inputs of one two-way
// router and checks every packet that comes out. A packet whose first word
// (hop count) decrements to a non-zero value must leave on output S whole,
// with that word decremented; one whose count decrements to zero must leave
// on output P without its first word. Packets must leave intact and in
// order per input; the two inputs may interleave only at packet
// boundaries. Counts how often each mechanism happened: straight and turned
// packets, multi-word streaming, both inputs waiting at once, the output
// stalling the router, and the ring polling with nothing to do.
module tb_router_macro;
  import router_pkg::*;
  localparam int NPKT = 150;
  int checks = 0, failures = 0;

  logic  clr_n, init;
  logic  [1:0] in_req, in_ack;
  word_t in_w [2];
  logic  s_req, s_ack, p_req, p_ack;
  word_t out_w;

  router_macro dut (
    .clr_n(clr_n), .init(init),
    .ina_req(in_req[0]), .ina_ack(in_ack[0]), .ina(in_w[0]),
    .inb_req(in_req[1]), .inb_ack(in_ack[1]), .inb(in_w[1]),
    .outs_req(s_req), .outs_ack(s_ack), .outp_req(p_req), .outp_ack(p_ack),
    .out(out_w));

  typedef word_t pkt_t [$];
  // Expected packets per output (0 = S, 1 = P) per source channel.
  pkt_t exp_q [2][2][$];
  int sent_done [2];
  int n_straight = 0, n_turn = 0, n_stream = 0, n_both_wait = 0, n_stall = 0;
  int n_recv [2];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    #4000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Random packet: hop count 0..15 (0 stands for 16), second address, 1..4
  // payload words.
  function automatic pkt_t make_pkt(int ch, int n);
    pkt_t p;
    int len = $urandom_range(1, 4);
    p.push_back({1'b0, 4'($urandom_range(0, 15))});
    p.push_back({1'b0, 4'($urandom)});
    // The first payload word carries the input number and a sequence count.
    for (int i = 0; i < len; i++)
      p.push_back({(i == len - 1), (i == 0) ? {2'(ch), 2'(n)} : 4'($urandom)});
    return p;
  endfunction

  for (genvar ch = 0; ch < 2; ch++) begin : g_src
    initial begin
      in_req[ch] = 0;
      in_w[ch]   = '0;
      wait (clr_n === 1'b1);
      #($urandom_range(5, 40));
      for (int n = 0; n < NPKT; n++) begin
        pkt_t p, e;
        p = make_pkt(ch, n);
        // Expected output.
        e = p;
        if (p[0][FIELD_W-1:0] != 1) begin
          e[0] = {1'b0, p[0][FIELD_W-1:0] - 4'd1};
          exp_q[0][ch].push_back(e);
        end else begin
          void'(e.pop_front());
          exp_q[1][ch].push_back(e);
        end
        foreach (p[i]) begin
          in_w[ch] = p[i];
          #1;
          in_req[ch] = ~in_req[ch];
          #1;
          if (in_req[0] != in_ack[0] && in_req[1] != in_ack[1]) n_both_wait++;
          wait (in_ack[ch] == in_req[ch]);
          #($urandom_range(0, 3));
        end
        // Sometimes pause so the ring polls with nothing to do.
        if ($urandom_range(0, 9) == 0) #($urandom_range(20, 80));
      end
      sent_done[ch] = 1;
    end
  end

  // Output receivers: o = 0 for S, 1 for P.
  task automatic receive(int o);
    pkt_t cur;
    forever begin
      word_t w;
      if (o == 0) wait (s_req != s_ack); else wait (p_req != p_ack);
      #1;
      w = out_w;
      cur.push_back(w);
      if (w[TAG_BIT]) begin
        bit matched = 0;
        for (int ch = 0; ch < 2 && !matched; ch++) begin
          if (exp_q[o][ch].size() > 0 && exp_q[o][ch][0] == cur) begin
            void'(exp_q[o][ch].pop_front());
            matched = 1;
          end
        end
        check(matched, $sformatf("output %s: packet %p matches the head of an input's expected packets",
                                 o ? "P" : "S", cur));
        if (o == 0) n_straight++; else n_turn++;
        if (cur.size() > 2) n_stream++;
        n_recv[o]++;
        cur.delete();
      end
      if ($urandom_range(0, 7) == 0) begin
        #($urandom_range(10, 40));
        n_stall++;
      end else begin
        #($urandom_range(0, 3));
      end
      if (o == 0) s_ack = ~s_ack; else p_ack = ~p_ack;
    end
  endtask

  initial begin
    s_ack = 0; p_ack = 0; init = 0; clr_n = 0;
    #10 clr_n = 1;
    #2  init = 1;
    fork
      receive(0);
      receive(1);
    join_none
    wait (sent_done[0] != 0 && sent_done[1] != 0);
    #300;
    for (int o = 0; o < 2; o++)
      for (int ch = 0; ch < 2; ch++)
        check(exp_q[o][ch].size() == 0, $sformatf("output %0d: all packets from input %0d delivered (%0d left)",
                                                  o, ch, exp_q[o][ch].size()));
    check(n_straight > 0, "straight packets seen");
    check(n_turn > 0, "turned packets seen");
    check(n_stream > 0, "multi-word streaming seen");
    check(n_both_wait > 0, "both inputs waiting at once");
    check(n_stall > 0, "output stalls seen");
    $display("straight=%0d turn=%0d stream=%0d both_wait=%0d stalls=%0d",
             n_straight, n_turn, n_stream, n_both_wait, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
