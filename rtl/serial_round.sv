// serial_round: round-to-nearest of a bit-serial product stream.
// The product arrives LSB first. In the cycle of the highest dropped bit
// (strobe high) that bit is stored as the carry; every later bit leaves as
// bit ^ carry and the carry becomes bit & carry, i.e. the kept upper part is
// incremented when the dropped part is one half or more. The bits before the
// strobe are simply not used by the receiver. r_bit is combinational.
// Rounding of the serial product follows the source design; the serial
// incrementer is this design's choice.
module serial_round (
  input  logic clk,
  input  logic rst_n,
  input  logic strobe,
  input  logic p_bit,
  output logic r_bit
);
  logic cy_q;

  assign r_bit = p_bit ^ cy_q;

  always_ff @(posedge clk) begin
    if (!rst_n)      cy_q <= 1'b0;
    else if (strobe) cy_q <= p_bit;
    else             cy_q <= p_bit & cy_q;
  end
endmodule
