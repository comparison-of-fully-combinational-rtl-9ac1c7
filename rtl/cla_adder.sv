// cla_adder: two's complement adder with carry look-ahead.
// The operands are zero-padded to whole 4-bit groups. Inside a group every
// carry is a two-level sum of products of the generate/propagate terms and
// the group's carry-in; the group carries then ripple from group to group.
// Purely combinational.
// The source design names carry look-ahead adders for its additions; the
// group size of 4 is this design's choice.
//   a, b, cin -> sum = a + b + cin (mod 2**W), cout = carry out of the MSB.
module cla_adder #(
  parameter int W = 34
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);
  localparam int GRP = 4;
  localparam int NG  = (W + GRP - 1) / GRP;
  localparam int WP  = NG * GRP;               // width padded to whole groups

  logic [WP-1:0] ap, bp, sp;
  logic          c_top;

  assign ap = WP'(a);
  assign bp = WP'(b);

  always_comb begin
    logic       c0;
    logic [3:0] g4, p4, c4;
    c0 = cin;
    sp = '0;
    for (int k = 0; k < NG; k++) begin
      g4 = ap[4*k +: 4] & bp[4*k +: 4];
      p4 = ap[4*k +: 4] ^ bp[4*k +: 4];
      // look-ahead carries of the group, all from g4, p4 and c0
      c4[0] = c0;
      c4[1] = g4[0] | (p4[0] & c0);
      c4[2] = g4[1] | (p4[1] & g4[0]) | (p4[1] & p4[0] & c0);
      c4[3] = g4[2] | (p4[2] & g4[1]) | (p4[2] & p4[1] & g4[0]) | (p4[2] & p4[1] & p4[0] & c0);
      sp[4*k +: 4] = p4 ^ c4;
      c0 = g4[3] | (p4[3] & g4[2]) | (p4[3] & p4[2] & g4[1]) |
           (p4[3] & p4[2] & p4[1] & g4[0]) | (&p4 & c0);
    end
    c_top = c0;
  end

  assign sum = sp[W-1:0];
  // carry out of bit W-1: taken from the padded sum (padding bits are zero)
  if (WP == W) begin : g_cout_full
    assign cout = c_top;
  end else begin : g_cout_pad
    assign cout = sp[W];
  end
endmodule
