// ccs_decr4: four-bit carry-completion decrementer: four ccs_decr_bit cells
// chained carry pair to carry pair, en common to all bits.
//
// How it works: with en low all carry wires are low. Raising en starts the
// operation; the result is complete when cout or dout of the last bit is
// high (the cell has no separate ack; the user watches the final carry pair
// or joins it with other completion signals). Lowering en resets the chain.
// Decrement by one: cin = 0, din = 1 (the bits add the all-ones word).
//
// Interface: din_v[3:0] value, cin, din, en in; sum[3:0], cout, dout out.
// Stacking: cout/dout feed cin/din of the next four-bit cell.
// Timing: combinational, zero-delay.
//
// Built from the library bit cells; the four-bit grouping follows the
// library, the completion point (last carry pair) is this design's reading.
module ccs_decr4 (
  input  logic [3:0] din_v,
  input  logic       cin,
  input  logic       din,
  input  logic       en,
  output logic [3:0] sum,
  output logic       cout,
  output logic       dout
);
  logic [4:0] c, d;

  assign c[0] = cin;
  assign d[0] = din;
  for (genvar i = 0; i < 4; i++) begin : g_bit
    ccs_decr_bit u_bit (.din_v(din_v[i]), .cin(c[i]), .din(d[i]), .en(en),
                        .sum(sum[i]), .cout(c[i+1]), .dout(d[i+1]));
  end
  assign cout = c[4];
  assign dout = d[4];
endmodule
