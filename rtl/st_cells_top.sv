// st_cells_top: the self-timed cell set and its two example systems, side
// by side, with every port brought out as a plain signal. Nothing here is
// clocked: every channel is a two-phase (transition) request/acknowledge
// pair, and a bundled data word must be stable before its request toggles.
//
//   * Cell library group (lib_*): the control and arithmetic cells that are
//     not already used inside the two systems - a three-way Call with
//     shared acknowledge structure (call3a), a four-way Call (call4), the
//     Toggle, a three-element Q-select polling ring (qsel_loop3, which holds
//     qsel and qsel_init), and the four-bit carry-completion adder,
//     incrementer and decrementer (four-phase en/ack data paths).
//   * FIFO group (fifo_*): a 4-word by 8-bit self-timed FIFO built from
//     transition latches and C-elements.
//   * Router group (mesh_*): one mesh element of a two-dimensional
//     cut-through packet network, made of an X router and a Y router. Words
//     are 5 bits: a 4-bit field plus a last-word tag in bit 4.
//
// The three groups share only the active-low clear; mesh_init starts the
// routers' polling rings after the clear is released. The grouping follows
// the document's own examples (cell library, FIFO, routing chip); the port
// naming and which cells appear on their own are this design's choices.
//
// Tool note: The loops that lint reports here (UNOPTFLAT) are those of
// the instantiated self-timed cells; see their own notes.
module st_cells_top
  import router_pkg::*;
(
  input  logic        clr_n,

  // Three-way Call (call3a): three callers share one subroutine channel.
  input  logic [2:0]  lib_c3_r,
  output logic [2:0]  lib_c3_a,
  output logic        lib_c3_rs,
  input  logic        lib_c3_as,
  // Four-way Call (call4).
  input  logic [3:0]  lib_c4_r,
  output logic [3:0]  lib_c4_a,
  output logic        lib_c4_rs,
  input  logic        lib_c4_as,
  // Toggle: transitions on the input alternate between the two outputs.
  input  logic        lib_tog_in,
  output logic        lib_tog_out0,
  output logic        lib_tog_out1,
  // Q-select ring of three elements polling three probes.
  input  logic        lib_ql_req,
  input  logic [2:0]  lib_ql_probe,
  output logic [2:0]  lib_ql_preq,
  input  logic [2:0]  lib_ql_pack,
  output logic        lib_ql_ack,
  // Four-bit carry-completion adder.
  input  logic [3:0]  lib_add_a,
  input  logic [3:0]  lib_add_b,
  input  logic        lib_add_cin,
  input  logic        lib_add_din,
  input  logic        lib_add_en,
  output logic [3:0]  lib_add_sum,
  output logic        lib_add_cout,
  output logic        lib_add_dout,
  output logic        lib_add_ack,
  // Four-bit carry-completion incrementer.
  input  logic [3:0]  lib_inc_in,
  input  logic        lib_inc_cin,
  input  logic        lib_inc_din,
  input  logic        lib_inc_en,
  output logic [3:0]  lib_inc_sum,
  output logic        lib_inc_cout,
  output logic        lib_inc_dout,
  // Four-bit carry-completion decrementer.
  input  logic [3:0]  lib_dec_in,
  input  logic        lib_dec_cin,
  input  logic        lib_dec_din,
  input  logic        lib_dec_en,
  output logic [3:0]  lib_dec_sum,
  output logic        lib_dec_cout,
  output logic        lib_dec_dout,

  // Four-word FIFO.
  input  logic        fifo_rin,
  output logic        fifo_ain,
  input  logic [7:0]  fifo_d,
  output logic        fifo_rout,
  input  logic        fifo_aout,
  output logic [7:0]  fifo_q,

  // Mesh element.
  input  logic        mesh_init,
  input  logic        mesh_pin_req,
  output logic        mesh_pin_ack,
  input  word_t       mesh_pin,
  input  logic        mesh_xin_req,
  output logic        mesh_xin_ack,
  input  word_t       mesh_xin,
  input  logic        mesh_yin_req,
  output logic        mesh_yin_ack,
  input  word_t       mesh_yin,
  output logic        mesh_xout_req,
  input  logic        mesh_xout_ack,
  output word_t       mesh_xout,
  output logic        mesh_yout_req,
  input  logic        mesh_yout_ack,
  output word_t       mesh_yout,
  output logic        mesh_pout_req,
  input  logic        mesh_pout_ack,
  output word_t       mesh_pout
);

  call3a u_call3a (
    .r1(lib_c3_r[0]), .a1(lib_c3_a[0]),
    .r2(lib_c3_r[1]), .a2(lib_c3_a[1]),
    .r3(lib_c3_r[2]), .a3(lib_c3_a[2]),
    .rs(lib_c3_rs), .as_i(lib_c3_as));

  call4 u_call4 (.r(lib_c4_r), .a(lib_c4_a), .rs(lib_c4_rs), .as_i(lib_c4_as));

  toggle u_toggle (.tin(lib_tog_in), .clr_n(clr_n), .out0(lib_tog_out0), .out1(lib_tog_out1));

  qsel_loop3 u_qloop (
    .req(lib_ql_req), .probe(lib_ql_probe), .clr_n(clr_n),
    .preq(lib_ql_preq), .pack(lib_ql_pack), .ack(lib_ql_ack));

  cca4 u_add (
    .a(lib_add_a), .b(lib_add_b), .cin(lib_add_cin), .din(lib_add_din), .en(lib_add_en),
    .sum(lib_add_sum), .cout(lib_add_cout), .dout(lib_add_dout), .ack(lib_add_ack));

  ccs_incr4 u_inc (
    .din_v(lib_inc_in), .cin(lib_inc_cin), .din(lib_inc_din), .en(lib_inc_en),
    .sum(lib_inc_sum), .cout(lib_inc_cout), .dout(lib_inc_dout));

  ccs_decr4 u_dec (
    .din_v(lib_dec_in), .cin(lib_dec_cin), .din(lib_dec_din), .en(lib_dec_en),
    .sum(lib_dec_sum), .cout(lib_dec_cout), .dout(lib_dec_dout));

  fifo4 u_fifo (
    .rin(fifo_rin), .ain(fifo_ain), .d(fifo_d),
    .rout(fifo_rout), .aout(fifo_aout), .clr_n(clr_n), .q(fifo_q));

  mesh_element u_mesh (
    .clr_n(clr_n), .init(mesh_init),
    .pin_req(mesh_pin_req), .pin_ack(mesh_pin_ack), .pin(mesh_pin),
    .xin_req(mesh_xin_req), .xin_ack(mesh_xin_ack), .xin(mesh_xin),
    .yin_req(mesh_yin_req), .yin_ack(mesh_yin_ack), .yin(mesh_yin),
    .xout_req(mesh_xout_req), .xout_ack(mesh_xout_ack), .xout(mesh_xout),
    .yout_req(mesh_yout_req), .yout_ack(mesh_yout_ack), .yout(mesh_yout),
    .pout_req(mesh_pout_req), .pout_ack(mesh_pout_ack), .pout(mesh_pout));

endmodule
