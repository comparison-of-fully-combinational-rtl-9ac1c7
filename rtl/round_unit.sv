// round_unit: rounds a full-width product to the data width, to nearest.
// The IN_W-OUT_W low bits are dropped; if the dropped part is one half or more
// the kept part is incremented (ties round upwards). Combinational.
// For a product of an OUT_W-bit datum and an (IN_W-OUT_W)-bit coefficient the
// rounded value always fits OUT_W bits, so no saturation is needed here.
// Round-to-nearest on the product follows the source design; ties upward is
// this design's choice.
module round_unit #(
  parameter int IN_W  = 34,
  parameter int OUT_W = 20
) (
  input  logic signed [IN_W-1:0]  din,
  output logic signed [OUT_W-1:0] dout
);
  localparam int DROP = IN_W - OUT_W;

  logic [IN_W-DROP-1:0] kept;
  assign kept = din[IN_W-1:DROP];
  assign dout = signed'(OUT_W'(kept + (IN_W-DROP)'(din[DROP-1])));
endmodule
