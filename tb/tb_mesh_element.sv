// tb_mesh_element: random packets into all three inputs of one mesh
// element (processor, X and Y), checked at all three outputs. A packet is
// [x hops, y hops, payload...] on the processor and X inputs and
// [y hops, payload...] on the Y input; counts are 1..15, or 0 for 16, and the last
// payload word has the tag bit set. The X router decrements the first word;
// non-zero continues on X with the new count, zero drops it and passes the
// rest to the Y router, which does the same with its first word and
// delivers to the processor output on zero. Per input and output, packets
// must arrive whole and in order. Counts straight X, turns into Y, straight
// Y, deliveries, X and Y traffic in flight at the same time, and stalls.
module tb_mesh_element;
  import router_pkg::*;
  localparam int NPKT = 120;
  int checks = 0, failures = 0;

  logic  clr_n, init;
  logic  [2:0] in_req, in_ack;     // 0 = P, 1 = X, 2 = Y
  word_t in_w [3];
  logic  [2:0] out_req, out_ack;   // 0 = X, 1 = Y, 2 = P
  word_t out_w [3];

  mesh_element dut (
    .clr_n(clr_n), .init(init),
    .pin_req(in_req[0]), .pin_ack(in_ack[0]), .pin(in_w[0]),
    .xin_req(in_req[1]), .xin_ack(in_ack[1]), .xin(in_w[1]),
    .yin_req(in_req[2]), .yin_ack(in_ack[2]), .yin(in_w[2]),
    .xout_req(out_req[0]), .xout_ack(out_ack[0]), .xout(out_w[0]),
    .yout_req(out_req[1]), .yout_ack(out_ack[1]), .yout(out_w[1]),
    .pout_req(out_req[2]), .pout_ack(out_ack[2]), .pout(out_w[2]));

  typedef word_t pkt_t [$];
  pkt_t exp_q [3][3][$];           // [output][input]
  bit   in_pkt [3];
  int   sent_done [3];
  int   n_out [3];
  int   n_concurrent = 0, n_stall = 0, n_stream = 0;
  string oname [3] = '{"X", "Y", "P"};

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    #6000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Route a packet by the rule above; returns the output and the packet
  // expected there.
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

  for (genvar ch = 0; ch < 3; ch++) begin : g_src
    initial begin
      in_req[ch] = 0;
      in_w[ch]   = '0;
      wait (clr_n === 1'b1);
      #($urandom_range(5, 40));
      for (int n = 0; n < NPKT; n++) begin
        pkt_t p, e;
        int o, len;
        p.delete();
        len = $urandom_range(1, 3);
        // Count 1 (turn here) half the time, so that every route is common;
        // otherwise 0..15, where 0 stands for 16.
        if (ch != 2) p.push_back({1'b0, 4'(($urandom_range(0, 1) != 0) ? 1 : $urandom_range(0, 15))});
        p.push_back({1'b0, 4'(($urandom_range(0, 1) != 0) ? 1 : $urandom_range(0, 15))});
        // First payload word carries the input number and a sequence count,
        // so packets from different inputs can never be confused.
        for (int i = 0; i < len; i++)
          p.push_back({(i == len - 1), (i == 0) ? {2'(ch), 2'(n)} : 4'($urandom)});
        o = route(p, ch == 2, e);
        exp_q[o][ch].push_back(e);
        foreach (p[i]) begin
          in_w[ch] = p[i];
          #1;
          in_req[ch] = ~in_req[ch];
          wait (in_ack[ch] == in_req[ch]);
          #($urandom_range(0, 3));
        end
        if ($urandom_range(0, 9) == 0) #($urandom_range(20, 80));
      end
      sent_done[ch] = 1;
    end
  end

  task automatic receive(int o);
    pkt_t cur;
    forever begin
      word_t w;
      wait (out_req[o] != out_ack[o]);
      #1;
      w = out_w[o];
      if ((o == 0 && in_pkt[1]) || (o == 1 && in_pkt[0])) n_concurrent++;
      in_pkt[o] = 1;
      cur.push_back(w);
      if (w[TAG_BIT]) begin
        bit matched = 0;
        for (int ch = 0; ch < 3 && !matched; ch++)
          if (exp_q[o][ch].size() > 0 && exp_q[o][ch][0] == cur) begin
            void'(exp_q[o][ch].pop_front());
            matched = 1;
          end
        check(matched, $sformatf("output %s: packet %p is the next one expected from some input",
                                 oname[o], cur));

        if (cur.size() > 1) n_stream++;
        n_out[o]++;
        in_pkt[o] = 0;
        cur.delete();
      end
      if ($urandom_range(0, 7) == 0) begin
        #($urandom_range(10, 40));
        n_stall++;
      end else begin
        #($urandom_range(0, 3));
      end
      out_ack[o] = ~out_ack[o];
    end
  endtask

  initial begin
    out_ack = '0; init = 0; clr_n = 0;
    #10 clr_n = 1;
    #2  init = 1;
    fork
      receive(0);
      receive(1);
      receive(2);
    join_none
    wait (sent_done[0] != 0 && sent_done[1] != 0 && sent_done[2] != 0);
    #500;
    for (int o = 0; o < 3; o++)
      for (int ch = 0; ch < 3; ch++)
        check(exp_q[o][ch].size() == 0,
              $sformatf("output %s: everything from input %0d delivered (%0d left)",
                        oname[o], ch, exp_q[o][ch].size()));
    check(n_out[0] > 0, "packets continued along X");
    check(n_out[1] > 0, "packets left along Y");
    check(n_out[2] > 0, "packets delivered to the processor");
    check(n_concurrent > 0, "X and Y outputs busy with different packets at once");
    check(n_stall > 0, "output stalls");
    $display("xout=%0d yout=%0d pout=%0d concurrent=%0d multiword=%0d stalls=%0d",
             n_out[0], n_out[1], n_out[2], n_concurrent, n_stream, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
