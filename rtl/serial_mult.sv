// serial_mult: bit-serial x parallel multiplier for two's complement data.
// The datum arrives one bit per clock, least significant bit first; the
// coefficient is held in parallel. Each cycle the coefficient is added to a
// running partial sum when the datum bit is one, the lowest bit of the sum is
// the next product bit, and the sum is shifted right one place. After the n
// datum bits the multiplier keeps repeating the datum's sign bit (ext high),
// which sign-extends the datum, so 2*n cycles deliver 2*n product bits, LSB
// first; for a 20-bit datum and 14-bit coefficient bits 0..33 are the full
// product and the rest its sign extension.
// Timing: start is high with bit 0 (it clears the partial sum); p_bit is
// combinational, product bit k is valid in the cycle that receives datum
// bit k (or the k-th sign-extension cycle).
// The 2n-cycle operation and the sign injection follow the source design;
// the partial-sum (shift-and-add) organisation is this design's choice.
module serial_mult #(
  parameter int CW = 14
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic                 ext,
  input  logic                 x_bit,
  input  logic signed [CW-1:0] coef,
  output logic                 p_bit
);
  logic signed [CW:0]   psum;      // running partial sum, shifted right
  logic signed [CW+1:0] t;
  logic                 sign_q;
  logic                 xb;

  assign xb    = ext ? sign_q : x_bit;
  assign t     = (start ? '0 : (CW+2)'(psum)) + (xb ? (CW+2)'(coef) : '0);
  assign p_bit = t[0];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      psum   <= '0;
      sign_q <= 1'b0;
    end else begin
      psum <= (CW+1)'(t >>> 1);
      if (!ext) sign_q <= x_bit;
    end
  end
endmodule
