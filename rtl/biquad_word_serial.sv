// biquad_word_serial: biquad built around a single 34-bit adder.
// Every addition and every multiplication of the section goes through one
// carry look-ahead adder, sequenced by a controller. A multiplication is a
// radix-4 Booth shift-and-add: the 20-bit datum is recoded into ten digits in
// {-2,-1,0,+1,+2} and the coefficient, shifted two places per step, is added
// or subtracted accordingly. One multiplication takes 13 cycles:
//   step 0      reset the accumulator, load the operands
//   steps 1-10  add the ten partial products
//   step 11     final addition (here: the rounding constant 2**13)
//   step 12     read the result (upper 20 bits of the 34-bit accumulator)
// An addition takes one cycle; its result is saturated where it is stored.
// Operation order per sample (ops 0..6):
//   rnd(a3*w2), rnd(a2*w1), s = sum, w = sat((x-s)<<A1_SHIFT),
//   rnd(b2*w1), rnd(b1*w), y = sat(sum)
// giving 4*13 + 3 = 55 busy cycles per sample.
// Interface: in_ready high when idle; a sample is taken on in_valid &&
// in_ready (x and coefs are registered then). out_valid pulses for one cycle
// with y, 55 cycles after the accepting edge. rst_n is active low and
// synchronous and clears the state registers w1, w2.
// The single adder, radix-4 Booth recoding and the 13-cycle multiplication
// breakdown follow the source design; the use of the final-addition step
// for the rounding constant and the operation order are this design's
// choices.
module biquad_word_serial
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
  localparam int MUL_STEPS = 13;
  localparam int DIGITS    = DATA_W / 2;   // 10 radix-4 digits

  typedef enum logic [2:0] {
    OP_MUL_A3 = 3'd0,
    OP_MUL_A2 = 3'd1,
    OP_ADD_S  = 3'd2,
    OP_ADD_W  = 3'd3,
    OP_MUL_B2 = 3'd4,
    OP_MUL_B1 = 3'd5,
    OP_ADD_Y  = 3'd6
  } op_t;

  logic        busy;
  op_t         op;
  logic [3:0]  step;
  logic        is_mul;

  data_t       x_r, w1, w2, w_new;
  coefs_t      c_r;
  prod_t       acc;          // accumulator of the multiplier
  prod_t       mcand;        // coefficient, shifted two places per step
  logic [DATA_W:0] mq;       // multiplier datum with the Booth guard bit
  prod_t       t0, t1;       // results of earlier operations

  // ---------------- the one adder ----------------
  prod_t       add_a, add_b, add_sum;
  logic        add_cin;

  cla_adder #(.W(PROD_W)) u_adder (
    .a(add_a), .b(add_b), .cin(add_cin), .sum(add_sum), .cout()
  );

  // Booth digit from the three low bits of mq
  logic [2:0] bd;
  logic       b_zero, b_two, b_neg;
  assign bd     = mq[2:0];
  assign b_zero = (bd == 3'b000) || (bd == 3'b111);
  assign b_two  = (bd == 3'b011) || (bd == 3'b100);
  assign b_neg  = bd[2] && !b_zero;

  assign is_mul = (op == OP_MUL_A3) || (op == OP_MUL_A2) ||
                  (op == OP_MUL_B2) || (op == OP_MUL_B1);

  always_comb begin
    add_a   = acc;
    add_b   = '0;
    add_cin = 1'b0;
    if (is_mul) begin
      if (step >= 4'd1 && step <= 4'(DIGITS)) begin
        prod_t m;
        m = b_zero ? '0 : (b_two ? (mcand <<< 1) : mcand);
        add_b   = b_neg ? ~m : m;
        add_cin = b_neg;
      end else if (step == 4'(MUL_STEPS - 2)) begin
        add_b = prod_t'(1) <<< (FRAC_W - 1);
      end
    end else begin
      unique case (op)
        OP_ADD_S: begin add_a = t0; add_b = t1; end
        OP_ADD_W: begin add_a = prod_t'(x_r); add_b = ~t0; add_cin = 1'b1; end
        default:  begin add_a = t0; add_b = t1; end      // OP_ADD_Y
      endcase
    end
  end

  // saturation of the stored addition results
  data_t sat_w, sat_y;
  logic  clip_w, clip_y;
  sat_unit #(.IN_W(PROD_W + SHIFT), .OUT_W(DATA_W)) u_sat_w (
    .din(signed'((PROD_W + SHIFT)'(add_sum) <<< SHIFT)), .dout(sat_w), .clipped(clip_w)
  );
  sat_unit #(.IN_W(PROD_W), .OUT_W(DATA_W)) u_sat_y (
    .din(add_sum), .dout(sat_y), .clipped(clip_y)
  );

  // multiplication operands of each op
  data_t mul_data;
  coef_t mul_coef;
  always_comb begin
    unique case (op)
      OP_MUL_A3: begin mul_data = w2;    mul_coef = c_r.a3; end
      OP_MUL_A2: begin mul_data = w1;    mul_coef = c_r.a2; end
      OP_MUL_B2: begin mul_data = w1;    mul_coef = c_r.b2; end
      default:   begin mul_data = w_new; mul_coef = c_r.b1; end
    endcase
  end

  data_t mul_result;
  assign mul_result = acc[PROD_W-1:FRAC_W];

  assign in_ready = !busy;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      op        <= OP_MUL_A3;
      step      <= '0;
      w1        <= '0;
      w2        <= '0;
      w_new     <= '0;
      x_r       <= '0;
      c_r       <= '0;
      acc       <= '0;
      mcand     <= '0;
      mq        <= '0;
      t0        <= '0;
      t1        <= '0;
      y         <= '0;
      out_valid <= 1'b0;
      sat_event <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      sat_event <= 1'b0;
      if (!busy) begin
        if (in_valid) begin
          busy <= 1'b1;
          x_r  <= x;
          c_r  <= coefs;
          op   <= OP_MUL_A3;
          step <= '0;
        end
      end else if (is_mul) begin
        step <= step + 4'd1;
        if (step == 4'd0) begin
          acc   <= '0;
          mcand <= prod_t'(mul_coef);
          mq    <= {mul_data, 1'b0};
        end else if (step <= 4'(DIGITS)) begin
          acc   <= add_sum;
          mcand <= mcand <<< 2;
          mq    <= {mq[DATA_W], mq[DATA_W], mq[DATA_W:2]};
        end else if (step == 4'(MUL_STEPS - 2)) begin
          acc   <= add_sum;
        end else begin                      // step 12: read the result
          step <= '0;
          if (op == OP_MUL_A3 || op == OP_MUL_B1) t0 <= prod_t'(mul_result);
          else                                    t1 <= prod_t'(mul_result);
          op <= op_t'(op + 3'd1);
        end
      end else begin
        unique case (op)
          OP_ADD_S: begin
            t0 <= add_sum;
            op <= OP_ADD_W;
          end
          OP_ADD_W: begin
            w_new     <= sat_w;
            sat_event <= clip_w;
            op        <= OP_MUL_B2;
          end
          default: begin                    // OP_ADD_Y
            y         <= sat_y;
            sat_event <= clip_y;
            out_valid <= 1'b1;
            w1        <= w_new;
            w2        <= w1;
            busy      <= 1'b0;
            op        <= OP_MUL_A3;
          end
        endcase
      end
    end
  end
endmodule
