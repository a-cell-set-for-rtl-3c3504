// router_macro: one two-way cut-through packet router. It takes packets
// from two input channels (A and B) and sends each one out either straight
// on (output S) or turned (output P), decided by the packet's first word.
// Two of these make a mesh element: the X router (A = processor, B = X
// input, S = X output, P = to the Y router) and the Y router (A = from the
// X router, B = Y input, S = Y output, P = processor).
//
// Packet format: five-bit words, a four-bit field and a tag bit set on the
// last word. Word 0 is the hop count in this router's dimension; word 1 is
// the hop count in the other dimension; then the payload.
//
// How it works, as a self-timed program built from the library cells:
//  1. Polling. A ring of two Q-selects (the first with init) tests the
//     probes of channels A and B in turn; a probe is high while a word is
//     waiting (request xor acknowledge). A true probe grants its channel.
//  2. Address. The granted channel's word is read into the word register
//     (VAR); a Call shared by both channels starts the decrement unit,
//     whose result is written back into the field of VAR.
//  3. Turn or not. A Select on NOT zero (ZeroP of the new field) steers:
//     non-zero -> send VAR on S, then keep streaming on S;
//     zero     -> the address word is dropped; stream the rest on P.
//  4. Streaming. Each send's acknowledge enters a Select on the tag bit of
//     the word just sent: tag clear -> read the next word and send it on
//     the same output; tag set -> the packet is done.
//  5. Done. The packet-done transition is merged (XOR) into the request of
//     the other channel's Q-select, so polling resumes with the other
//     channel.
// Each input channel is read at three points (first word; next word on the
// S path; next word on the P path), hence the three-way channel cell. Both
// outputs carry VAR; a Call per output merges the sends of the two
// channels.
//
// Interface: clr_n (clear, all control wires low), init (one transition
// starts the polling ring), channel A / B inputs (req, ack, word), outputs
// S / P (req, ack) with the common data word out. All channels are
// two-phase bundled data. Timing: asynchronous; see the cell delays (DLY).
//
// The blocks (Q-select ring, three-way channels, VAR with three write
// ports, Call-shared decrement unit, ZeroP, Calls on the outputs, Selects
// on zero and the tag bit) follow the router schematics and the routing
// rule described for the example. Their exact interconnection in the
// original was generated automatically from a program that is not
// available; the sequence above is this design's reconstruction of it.
//
// Tool note: The control program is a set of transition loops through
// Selects, Calls and C-elements, which lint reports as circular logic
// (UNOPTFLAT); each loop is a step of the program and is intended.
module router_macro
  import router_pkg::*;
#(
  parameter int unsigned DLY = 1
) (
  input  logic  clr_n,
  input  logic  init,
  input  logic  ina_req,
  output logic  ina_ack,
  input  word_t ina,
  input  logic  inb_req,
  output logic  inb_ack,
  input  word_t inb,
  output logic  outs_req,
  input  logic  outs_ack,
  output logic  outp_req,
  input  logic  outp_ack,
  output word_t out
);
  // Per-channel control wires, index 0 = channel A, 1 = channel B.
  logic [1:0] probe, grant, rvar, avar;
  logic [1:0] r1, a1, r2, a2, r3, a3;
  logic [1:0] d_req, d_ack, z_t, z_f;
  logic [1:0] s_req, s_ack, ts_t, ts_f;
  logic [1:0] p_req, p_ack, tp_t, tp_f, done;
  logic [1:0] q_fout, q_snext;
  logic       zero;
  logic       dec_r, dec_a, wb_r, wb_a;
  logic [FIELD_W-1:0] mid;

  // 1. Polling ring.
  qsel_init #(.DLY(DLY)) u_qa (
    .req(q_fout[1] ^ done[1]), .probe(probe[0]), .smpl(q_snext[1]), .init(init),
    .clr_n(clr_n), .tout(grant[0]), .fout(q_fout[0]), .snext(q_snext[0]));
  qsel #(.DLY(DLY)) u_qb (
    .req(q_fout[0] ^ done[0]), .probe(probe[1]), .smpl(q_snext[0]),
    .clr_n(clr_n), .tout(grant[1]), .fout(q_fout[1]), .snext(q_snext[1]));

  // Input channels.
  chan3 u_cha (.clr_n(clr_n), .in_req(ina_req), .in_ack(ina_ack), .probe(probe[0]),
               .r1(r1[0]), .a1(a1[0]), .r2(r2[0]), .a2(a2[0]), .r3(r3[0]), .a3(a3[0]),
               .rvar(rvar[0]), .avar(avar[0]));
  chan3 u_chb (.clr_n(clr_n), .in_req(inb_req), .in_ack(inb_ack), .probe(probe[1]),
               .r1(r1[1]), .a1(a1[1]), .r2(r2[1]), .a2(a2[1]), .r3(r3[1]), .a3(a3[1]),
               .rvar(rvar[1]), .avar(avar[1]));

  // Word register and zero test.
  var_reg #(.DLY_N(2), .DLY(DLY)) u_var (
    .r0(rvar[0]), .a0(avar[0]), .in0(ina),
    .r1(rvar[1]), .a1(avar[1]), .in1(inb),
    .r2(wb_r),    .a2(wb_a),    .in2(mid),
    .q(out));
  assign zero = (out[FIELD_W-1:0] == '0);

  // 2. Shared decrement: decrement, then write the result back into VAR.
  call2 u_call_dec (.r1(d_req[0]), .a1(d_ack[0]), .r2(d_req[1]), .a2(d_ack[1]),
                    .rs(dec_r), .as_i(wb_a));
  decr_unit #(.DLY(DLY)) u_dec (.r(dec_r), .a(dec_a), .v(out[FIELD_W-1:0]), .mid(mid), .clr_n(clr_n));
  assign wb_r = dec_a;

  // Output Calls.
  call2 u_call_s (.r1(s_req[0]), .a1(s_ack[0]), .r2(s_req[1]), .a2(s_ack[1]),
                  .rs(outs_req), .as_i(outs_ack));
  call2 u_call_p (.r1(p_req[0]), .a1(p_ack[0]), .r2(p_req[1]), .a2(p_ack[1]),
                  .rs(outp_req), .as_i(outp_ack));

  // 3.-5. Per-channel program.
  for (genvar k = 0; k < 2; k++) begin : g_ch
    assign r1[k]    = grant[k];                 // read the address word
    assign d_req[k] = a1[k];                    // then decrement it
    tselect u_zsel (.tin(d_ack[k]), .sel(!zero), .clr_n(clr_n), .outt(z_t[k]), .outf(z_f[k]));

    // Straight path: send, test the tag, read the next word, send again.
    assign s_req[k] = z_t[k] ^ a2[k];
    tselect u_tsel_s (.tin(s_ack[k]), .sel(out[TAG_BIT]), .clr_n(clr_n), .outt(ts_t[k]), .outf(ts_f[k]));
    assign r2[k]    = ts_f[k];

    // Turn path: drop the address word, read the next word, send, test.
    assign r3[k]    = z_f[k] ^ tp_f[k];
    assign p_req[k] = a3[k];
    tselect u_tsel_p (.tin(p_ack[k]), .sel(out[TAG_BIT]), .clr_n(clr_n), .outt(tp_t[k]), .outf(tp_f[k]));

    assign done[k]  = ts_t[k] ^ tp_t[k];
  end
endmodule
