// biquad_comb_seq: combinational-sequential biquad.
// One array multiplier with its rounder and one carry look-ahead adder with
// saturation are shared over six clock cycles by a six-state controller
// (cs_controller). A register file holds the sample, the coefficients, the
// previous state variables and the intermediate results; a multiplexer picks
// the adder's second operand. Schedule (one multiply and one add at most
// per cycle):
//   CS_RESET  accept x, coefs, v1_prev, v2_prev;  p3  = rnd(a3*v2_prev)
//   CS_S1     p2 = rnd(a2*v1)
//   CS_S2     s  = p2 + p3;  pb2 = rnd(b2*v1)
//   CS_S3     v1_next = sat((x - s) << A1_SHIFT)
//   CS_S4     pb1 = rnd(b1*v1_next)
//   CS_END    y = sat(pb1 + pb2);  v2_next = v1
// The state variables are not kept inside: the caller presents the previous
// ones (v1_prev = w(n-1), v2_prev = w(n-2)) with each sample and stores the
// next ones (v1_next, v2_next) returned with y.
// Interface: in_ready is high in CS_RESET; a sample is taken on
// in_valid && in_ready. out_valid pulses one cycle with y, v1_next and
// v2_next, five clock edges after the accepting edge; the controller is then
// back in CS_RESET and can accept the next sample at the following edge, so
// the rate is one sample per six cycles.
// The datapath (register file, multiplier, round, mux, adder, sat, output
// and next-state registers), the six states and the operation schedule
// follow the source design; the bypass that lets CS_RESET multiply the
// incoming v2_prev and the handshake are this design's choices.
module biquad_comb_seq
  import biquad_pkg::*;
#(
  parameter int SHIFT = A1_SHIFT
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  output logic   in_ready,
  input  data_t  x,
  input  coefs_t coefs,
  input  data_t  v1_prev,
  input  data_t  v2_prev,
  output logic   out_valid,
  output data_t  y,
  output data_t  v1_next,
  output data_t  v2_next,
  output logic   sat_event
);
  localparam int AW = DATA_W + 2;            // adder width: holds x - s
  localparam int HW = AW + SHIFT;

  cs_state_t state;
  logic      ready;

  cs_controller u_ctrl (
    .clk(clk), .rst_n(rst_n), .start(in_valid), .state(state),
    .ready(ready), .done()
  );

  // ---------------- register file ----------------
  data_t   rf_x, rf_v1, rf_w;      // w(n-2) is used only in CS_RESET, from the port
  coefs_t  rf_c;
  data_t   rf_p3, rf_p2, rf_pb2, rf_pb1;
  logic [AW-1:0] rf_s;

  // ---------------- multiplier + round ----------------
  data_t mul_a;
  coef_t mul_b;
  prod_t mul_p;
  data_t mul_r;

  always_comb begin
    unique case (state)
      CS_RESET: begin mul_a = v2_prev; mul_b = coefs.a3;  end
      CS_S1:    begin mul_a = rf_v1;   mul_b = rf_c.a2;   end
      CS_S2:    begin mul_a = rf_v1;   mul_b = rf_c.b2;   end
      default:  begin mul_a = rf_w;    mul_b = rf_c.b1;   end   // CS_S4
    endcase
  end

  bw_mult    #(.AW(DATA_W), .BW(COEF_W))  u_mult  (.a(mul_a), .b(mul_b), .p(mul_p));
  round_unit #(.IN_W(PROD_W), .OUT_W(DATA_W)) u_round (.din(mul_p), .dout(mul_r));

  // ---------------- mux, adder, sat ----------------
  logic [AW-1:0] add_a, add_b, add_sum;
  logic          add_cin;

  always_comb begin
    unique case (state)
      CS_S2:   begin add_a = AW'(rf_p2);  add_b = AW'(rf_p3);  add_cin = 1'b0; end
      CS_S3:   begin add_a = AW'(rf_x);   add_b = ~rf_s;       add_cin = 1'b1; end
      default: begin add_a = AW'(rf_pb1); add_b = AW'(rf_pb2); add_cin = 1'b0; end
    endcase
  end

  cla_adder #(.W(AW)) u_add (
    .a(add_a), .b(add_b), .cin(add_cin), .sum(add_sum), .cout()
  );

  logic [HW-1:0] sat_in;
  data_t         sat_out;
  logic          clipped;
  // the a(1) shift is applied only to the x - s result (state CS_S3)
  assign sat_in = (state == CS_S3) ? HW'(signed'(add_sum)) <<< SHIFT
                                   : HW'(signed'(add_sum));
  sat_unit #(.IN_W(HW), .OUT_W(DATA_W)) u_sat (
    .din(signed'(sat_in)), .dout(sat_out), .clipped(clipped)
  );

  assign in_ready = ready;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rf_x <= '0; rf_v1 <= '0; rf_w <= '0; rf_c <= '0;
      rf_p3 <= '0; rf_p2 <= '0; rf_pb2 <= '0; rf_pb1 <= '0; rf_s <= '0;
      y <= '0; v1_next <= '0; v2_next <= '0;
      out_valid <= 1'b0;
      sat_event <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      sat_event <= 1'b0;
      unique case (state)
        CS_RESET: if (in_valid) begin
          rf_x  <= x;
          rf_c  <= coefs;
          rf_v1 <= v1_prev;
          rf_p3 <= mul_r;
        end
        CS_S1: rf_p2 <= mul_r;
        CS_S2: begin
          rf_s   <= add_sum;            // 21-bit sum, kept unsaturated
          rf_pb2 <= mul_r;
        end
        CS_S3: begin
          rf_w      <= sat_out;
          sat_event <= clipped;
        end
        CS_S4: rf_pb1 <= mul_r;
        default: begin                  // CS_END
          y         <= sat_out;
          v1_next   <= rf_w;
          v2_next   <= rf_v1;
          out_valid <= 1'b1;
          sat_event <= clipped;
        end
      endcase
    end
  end
endmodule
