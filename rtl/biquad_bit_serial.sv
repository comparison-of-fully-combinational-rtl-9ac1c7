// biquad_bit_serial: bit-serial biquad.
// Every word travels LSB first, one bit per clock. The input sample is
// loaded in parallel into a parallel-to-serial (P/S) register and streamed,
// sign-extended, through SR1, an F-stage delay that aligns x(n) with the
// rounded products. Serial x parallel multipliers form a(2)*w(n-1),
// a(3)*w(n-2) and b(2)*w(n-1) from the words circulating in SR2 (w(n-1)) and
// SR3 (w(n-2)); serial rounders drop the low F bits; serial adders form
// s = rnd(a2*w1) + rnd(a3*w2) and x - s; the a(1) stage multiplies by
// 2**A1_SHIFT by delaying the stream A1_SHIFT cycles with zeros in front.
// The new w(n) is shifted into SR2 while the old w(n-1) moves into SR3, and
// the rounded b(2) product is parked in SR4. In a second pass SR2 feeds the
// b(1) multiplier; its rounded product plus SR4 goes into SR5, and the
// serial-to-parallel (S/P) output register takes SR5 in parallel.
// Saturation: a serial word's overflow is only known at its guard bits, so
// SR2 and SR5 watch the bits above the data width and, at the last guard
// bit, overwrite their content with the largest or smallest value.
// Interface: in_ready is high when idle; a sample is taken on
// in_valid && in_ready; out_valid pulses one cycle with y. Timing: 76 busy
// cycles plus the accepting edge, i.e. one sample every 77 clocks.
// The P/S and S/P registers, SR1-SR5, the five multipliers, the serial adders
// and the controller follow the source design's block diagram; the cycle
// plan, SR1's role as the alignment delay, SR4 as the store of the b(2)
// product and saturation at the receiving shift register are this design's
// choices.
module biquad_bit_serial
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
  output logic   out_valid,
  output data_t  y,
  output logic   sat_event
);
  localparam int W = DATA_W;
  localparam int F = FRAC_W;

  bs_ctrl_t ctrl;
  logic     ready;

  bs_controller #(.W(W), .F(F), .A(SHIFT)) u_ctrl (
    .clk(clk), .rst_n(rst_n), .start(in_valid), .ctrl(ctrl), .ready(ready)
  );

  assign in_ready = ready;

  logic accept;
  assign accept = in_valid && ready;

  // ---------------- registers ----------------
  logic [W-1:0] ps;       // P/S
  logic [F-1:0] sr1;      // alignment delay of x
  logic [W-1:0] sr2;      // w(n-1), then w(n)
  logic [W-1:0] sr3;      // w(n-2), then w(n-1)
  logic [W-1:0] sr4;      // rounded b(2) * w(n-1)
  logic [W-1:0] sr5;      // output word being assembled
  coefs_t       c_r;

  // ---------------- multipliers and rounders ----------------
  logic p_a2, p_a3, p_b2, p_b1;
  logic r_a2, r_a3, r_b2, r_b1;

  serial_mult #(.CW(COEF_W)) u_m_a2 (.clk(clk), .rst_n(rst_n), .start(ctrl.ma_start),
    .ext(ctrl.ma_ext), .x_bit(sr2[0]), .coef(c_r.a2), .p_bit(p_a2));
  serial_mult #(.CW(COEF_W)) u_m_a3 (.clk(clk), .rst_n(rst_n), .start(ctrl.ma_start),
    .ext(ctrl.ma_ext), .x_bit(sr3[0]), .coef(c_r.a3), .p_bit(p_a3));
  serial_mult #(.CW(COEF_W)) u_m_b2 (.clk(clk), .rst_n(rst_n), .start(ctrl.ma_start),
    .ext(ctrl.ma_ext), .x_bit(sr2[0]), .coef(c_r.b2), .p_bit(p_b2));
  serial_mult #(.CW(COEF_W)) u_m_b1 (.clk(clk), .rst_n(rst_n), .start(ctrl.mb_start),
    .ext(ctrl.mb_ext), .x_bit(sr2[0]), .coef(c_r.b1), .p_bit(p_b1));

  serial_round u_r_a2 (.clk(clk), .rst_n(rst_n), .strobe(ctrl.rnd_a), .p_bit(p_a2), .r_bit(r_a2));
  serial_round u_r_a3 (.clk(clk), .rst_n(rst_n), .strobe(ctrl.rnd_a), .p_bit(p_a3), .r_bit(r_a3));
  serial_round u_r_b2 (.clk(clk), .rst_n(rst_n), .strobe(ctrl.rnd_a), .p_bit(p_b2), .r_bit(r_b2));
  serial_round u_r_b1 (.clk(clk), .rst_n(rst_n), .strobe(ctrl.rnd_b), .p_bit(p_b1), .r_bit(r_b1));

  // ---------------- serial adders ----------------
  logic s_bit, d_bit, y_bit;

  serial_adder u_add_s (.clk(clk), .rst_n(rst_n), .first(ctrl.add_a_first), .sub(1'b0),
    .a(r_a2), .b(r_a3), .s(s_bit));
  serial_adder u_sub_d (.clk(clk), .rst_n(rst_n), .first(ctrl.add_a_first), .sub(1'b1),
    .a(sr1[0]), .b(s_bit), .s(d_bit));
  serial_adder u_add_y (.clk(clk), .rst_n(rst_n), .first(ctrl.add_b_first), .sub(1'b0),
    .a(r_b1), .b(sr4[0]), .s(y_bit));

  // ---------------- a(1) stage: multiply by 2**SHIFT ----------------
  logic wq;
  if (SHIFT == 0) begin : g_no_shift
    assign wq = d_bit;
  end else begin : g_shift
    logic [SHIFT-1:0] dl;
    always_ff @(posedge clk) begin
      if (!rst_n || ctrl.dl_clear) dl <= '0;
      else                         dl <= {d_bit, dl[SHIFT-1:1]};
    end
    assign wq = dl[0];
  end

  // ---------------- overflow watch of w(n) and y(n) ----------------
  logic w_ref_q, w_ovf_q, y_ref_q;
  logic w_over, y_over;
  assign w_over = w_ovf_q || (wq != w_ref_q);
  assign y_over = (y_bit != y_ref_q);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ps <= '0; sr1 <= '0; sr2 <= '0; sr3 <= '0; sr4 <= '0; sr5 <= '0;
      c_r <= '0;
      w_ref_q <= 1'b0; w_ovf_q <= 1'b0; y_ref_q <= 1'b0;
      y <= '0;
      out_valid <= 1'b0;
      sat_event <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      sat_event <= 1'b0;
      if (accept) begin
        ps  <= x;
        c_r <= coefs;
      end
      if (ctrl.ps_shift)  ps  <= {ps[W-1], ps[W-1:1]};
      if (ctrl.sr1_shift) sr1 <= {ps[0], sr1[F-1:1]};
      if (ctrl.sr3_shift) sr3 <= {sr2[0], sr3[W-1:1]};
      // SR2: shift out w(n-1) while shifting in w(n); recirculate in phase B
      if (ctrl.sr2_load)  sr2 <= {ctrl.wq_valid & wq, sr2[W-1:1]};
      if (ctrl.sr2_rot)   sr2 <= {sr2[0], sr2[W-1:1]};
      if (ctrl.w_ref) begin
        w_ref_q <= wq;
        w_ovf_q <= 1'b0;
      end
      if (ctrl.w_mon && (wq != w_ref_q)) w_ovf_q <= 1'b1;
      if (ctrl.sr2_sat && w_over) begin
        sr2       <= wq ? DATA_MIN : DATA_MAX;
        sat_event <= 1'b1;
      end
      if (ctrl.sr4_load)  sr4 <= {r_b2, sr4[W-1:1]};
      if (ctrl.sr4_out)   sr4 <= {sr4[W-1], sr4[W-1:1]};
      if (ctrl.sr5_shift) sr5 <= {y_bit, sr5[W-1:1]};
      if (ctrl.y_ref)     y_ref_q <= y_bit;
      if (ctrl.sr5_sat && y_over) begin
        sr5       <= y_bit ? DATA_MIN : DATA_MAX;
        sat_event <= 1'b1;
      end
      if (ctrl.out_load) begin
        y         <= sr5;
        out_valid <= 1'b1;
      end
    end
  end
endmodule
