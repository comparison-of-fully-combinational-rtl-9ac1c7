// sat_unit: clamps a wide two's complement value to OUT_W bits.
// Values above the largest OUT_W-bit number give that number, values below
// the smallest give the smallest, all others pass unchanged. Combinational.
// Saturation of adder results follows the source design.
module sat_unit #(
  parameter int IN_W  = 24,
  parameter int OUT_W = 20
) (
  input  logic signed [IN_W-1:0]  din,
  output logic signed [OUT_W-1:0] dout,
  output logic                    clipped
);
  logic upper_same;
  // the value fits when all bits from the OUT_W-1 position upward agree
  assign upper_same = (din[IN_W-1:OUT_W-1] == '0) || (din[IN_W-1:OUT_W-1] == '1);
  assign clipped    = !upper_same;

  always_comb begin
    if (upper_same)       dout = din[OUT_W-1:0];
    else if (din[IN_W-1]) dout = {1'b1, {(OUT_W-1){1'b0}}};
    else                  dout = {1'b0, {(OUT_W-1){1'b1}}};
  end
endmodule
