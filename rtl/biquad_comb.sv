// biquad_comb: fully combinational biquad, one sample per clock.
// Four modified Baugh-Wooley array multipliers form a2*w(n-1), a3*w(n-2),
// b1*w(n) and b2*w(n-1) at the same time; each 34-bit product is rounded to
// 20 bits, and three adders combine them:
//   s    = rnd(a2*w1) + rnd(a3*w2)                  (21 bits, exact)
//   w(n) = sat((x - s) << A1_SHIFT)                  (multiplication by a(1))
//   y    = sat(rnd(b1*w(n)) + rnd(b2*w1))
// The only storage is the pair of state registers w1 = w(n-1), w2 = w(n-2).
// Interface: x/in_valid in, y/out_valid out in the same cycle (out_valid is
// in_valid); the state registers advance on the clock edge where in_valid
// is high. rst_n (active low, synchronous) clears the state.
// The parallel operators, rounding after each product and saturation of the
// adders follow the source design; the exact order of saturation (only the
// values stored or output are saturated) is this design's choice, shared by
// all four implementations. The source design uses carry look-ahead adders
// here; the three adders of this variant are written as plain additions and
// their carry structure is left to synthesis, because the bit-level
// look-ahead network behind four array multipliers made the simulation model
// impractically slow to compile (the other variants use cla_adder).
module biquad_comb
  import biquad_pkg::*;
#(
  parameter int SHIFT = A1_SHIFT
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  input  data_t  x,
  input  coefs_t coefs,
  output logic   out_valid,
  output data_t  y,
  output logic   sat_event
);
  localparam int SW = DATA_W + 1;          // width of s
  localparam int DW = DATA_W + 2;          // width of x - s
  localparam int HW = DW + SHIFT;          // width of (x - s) << SHIFT

  data_t w1, w2, w_new;
  prod_t p_a2, p_a3, p_b1, p_b2;
  data_t r_a2, r_a3, r_b1, r_b2;
  logic [SW-1:0] s_sum;
  logic [DW-1:0] d_sum;
  logic [SW-1:0] y_sum;
  logic          clip_w, clip_y;

  bw_mult #(.AW(DATA_W), .BW(COEF_W)) u_m_a2 (.a(w1),    .b(coefs.a2), .p(p_a2));
  bw_mult #(.AW(DATA_W), .BW(COEF_W)) u_m_a3 (.a(w2),    .b(coefs.a3), .p(p_a3));
  bw_mult #(.AW(DATA_W), .BW(COEF_W)) u_m_b1 (.a(w_new), .b(coefs.b1), .p(p_b1));
  bw_mult #(.AW(DATA_W), .BW(COEF_W)) u_m_b2 (.a(w1),    .b(coefs.b2), .p(p_b2));

  round_unit #(.IN_W(PROD_W), .OUT_W(DATA_W)) u_r_a2 (.din(p_a2), .dout(r_a2));
  round_unit #(.IN_W(PROD_W), .OUT_W(DATA_W)) u_r_a3 (.din(p_a3), .dout(r_a3));
  round_unit #(.IN_W(PROD_W), .OUT_W(DATA_W)) u_r_b1 (.din(p_b1), .dout(r_b1));
  round_unit #(.IN_W(PROD_W), .OUT_W(DATA_W)) u_r_b2 (.din(p_b2), .dout(r_b2));

  // s = r_a2 + r_a3;  d = x - s
  assign s_sum = SW'(r_a2) + SW'(r_a3);
  assign d_sum = DW'(x) - DW'(signed'(s_sum));
  sat_unit #(.IN_W(HW), .OUT_W(DATA_W)) u_sat_w (
    .din(signed'(HW'(signed'(d_sum)) <<< SHIFT)), .dout(w_new), .clipped(clip_w)
  );
  // y = r_b1 + r_b2
  assign y_sum = SW'(r_b1) + SW'(r_b2);
  sat_unit #(.IN_W(SW), .OUT_W(DATA_W)) u_sat_y (
    .din(signed'(y_sum)), .dout(y), .clipped(clip_y)
  );

  assign out_valid = in_valid;
  assign sat_event = in_valid & (clip_w | clip_y);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      w1 <= '0;
      w2 <= '0;
    end else if (in_valid) begin
      w1 <= w_new;
      w2 <= w1;
    end
  end
endmodule
