// tb_biquad_comb: drives the fully combinational biquad with a stream of
// samples (in_valid now and then low) and compares y, produced in the same
// cycle as the sample, with the integer reference model (biquad_ref_pkg).
// Coefficients change every 64 samples: a stable low-pass section with a
// large step first (saturation), then random sets. Also checked: out_valid
// equals in_valid, and saturation occurred.
module tb_biquad_comb;
  import biquad_pkg::*;
  import biquad_ref_pkg::*;

  localparam int NS = 1000;

  logic   clk = 1'b0;
  logic   rst_n;
  logic   in_valid, out_valid, sat_event;
  data_t  x, y;
  coefs_t coefs;

  always #5 clk = ~clk;

  biquad_comb dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .x(x), .coefs(coefs),
    .out_valid(out_valid), .y(y), .sat_event(sat_event)
  );

  int checks = 0, failures = 0;
  int n_acc = 0, n_clip_ref = 0, n_sat_dut = 0;
  ref_state_t st = '{0, 0, 0, 1'b0};
  ref_coefs_t rc;

  function automatic coefs_t to_coefs(ref_coefs_t c);
    coefs_t r;
    r.a2 = coef_t'(c.a2); r.a3 = coef_t'(c.a3);
    r.b1 = coef_t'(c.b1); r.b2 = coef_t'(c.b2);
    return r;
  endfunction

  initial begin
    repeat (2 * NS + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n    = 1'b0;
    in_valid = 1'b0;
    x        = '0;
    rc       = lowpass_coefs();
    coefs    = to_coefs(rc);
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    while (n_acc < NS) begin
      @(negedge clk);
      if (n_acc % 64 == 0 && n_acc > 0) rc = rand_coefs();
      coefs    = to_coefs(rc);
      in_valid = ($urandom % 8) != 0;
      if (n_acc < 64) x = (n_acc < 40) ? 20'sd262143 : -20'sd262144;
      else            x = data_t'(rand_sample());
    end
  end

  always @(posedge clk) begin
    if (rst_n && n_acc < NS) begin
      checks++;
      if (out_valid != in_valid) failures++;
      if (in_valid) begin
        st = ref_next(longint'(x), rc, A1_SHIFT, st);
        if (st.clipped) n_clip_ref++;
        if (sat_event) n_sat_dut++;
        checks++;
        if (longint'(y) != st.y) begin
          failures++;
          if (failures < 10) $display("sample %0d: y=%0d expected %0d", n_acc, y, st.y);
        end
        n_acc++;
        if (n_acc == NS) begin
          checks++;
          if (n_clip_ref == 0 || n_sat_dut != n_clip_ref) begin
            failures++;
            $display("saturation: ref %0d dut %0d", n_clip_ref, n_sat_dut);
          end
          $display("samples %0d, saturations %0d", n_acc, n_sat_dut);
          $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
          $finish;
        end
      end
    end
  end
endmodule
