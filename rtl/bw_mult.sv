// bw_mult: signed array multiplier, modified Baugh-Wooley form.
// For an AW-bit by BW-bit two's complement product every partial-product bit
// is a plain AND, except the bits that pair one operand's sign bit with a
// magnitude bit of the other, which are inverted; the correction constant
// 2**(AW-1) + 2**(BW-1) + 2**(AW+BW-1) completes the product. The partial
// product rows are summed by a chain of row adders (the "array").
// Purely combinational: p = a * b, AW+BW bits, exact.
// The source design specifies a modified Baugh-Wooley array multiplier with
// 20-bit data and 14-bit coefficients; the row-adder summation is this
// design's choice.
module bw_mult #(
  parameter int AW = 20,
  parameter int BW = 14
) (
  input  logic signed [AW-1:0]    a,
  input  logic signed [BW-1:0]    b,
  output logic signed [AW+BW-1:0] p
);
  localparam int PW = AW + BW;

  // sign-position masks: the bits of a row that are inverted
  localparam logic [AW-1:0] MSB_ONLY    = {1'b1, {(AW-1){1'b0}}};
  localparam logic [AW-1:0] ALL_BUT_MSB = ~MSB_ONLY;

  // rsum[j]: correction constant plus rows 0 .. j-1
  logic [PW-1:0] rsum [BW+1];
  assign rsum[0] = (PW'(1) << (AW-1)) + (PW'(1) << (BW-1)) + (PW'(1) << (PW-1));

  for (genvar j = 0; j < BW; j++) begin : g_row
    // row j: a AND b[j], with a's sign bit inverted (j < BW-1) or,
    // for the coefficient's sign row, all other bits inverted
    logic [AW-1:0] pp;
    assign pp = (a & {AW{b[j]}}) ^ ((j == BW-1) ? ALL_BUT_MSB : MSB_ONLY);
    assign rsum[j+1] = rsum[j] + (PW'(pp) << j);
  end

  assign p = signed'(rsum[BW]);
endmodule
