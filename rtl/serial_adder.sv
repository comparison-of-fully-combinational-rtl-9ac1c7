// serial_adder: 1-bit serial adder/subtractor with a carry flip-flop.
// Operands arrive one bit per clock, least significant first; the sum bit is
// combinational and the carry is kept for the next bit. With sub high the b
// operand is inverted and the first carry-in is one, giving a - b.
// Timing: first is high with bit 0 (it replaces the stored carry by the
// initial carry-in); sum bit k appears in the cycle of operand bit k.
// The bit-serial adder follows the source design.
module serial_adder (
  input  logic clk,
  input  logic rst_n,
  input  logic first,
  input  logic sub,
  input  logic a,
  input  logic b,
  output logic s
);
  logic cy_q, cin, bb;

  assign bb  = b ^ sub;
  assign cin = first ? sub : cy_q;
  assign s   = a ^ bb ^ cin;

  always_ff @(posedge clk) begin
    if (!rst_n) cy_q <= 1'b0;
    else        cy_q <= (a & bb) | (a & cin) | (bb & cin);
  end
endmodule
