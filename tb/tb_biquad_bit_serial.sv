// tb_biquad_bit_serial: drives the bit-serial biquad with a stream of samples
// and compares every output with the integer reference model
// (biquad_ref_pkg). Coefficients change every 64 samples: first a stable
// low-pass section fed with a large step (drives the state into saturation),
// then random coefficient sets with random samples. in_valid is held off now
// and then. Checked: every y, the latency from the accepting edge to
// out_valid (76 edges), the spacing of accepted samples when in_valid
// stays high (77 clocks), and that saturation occurred.
module tb_biquad_bit_serial;
  import biquad_pkg::*;
  import biquad_ref_pkg::*;

  localparam int NS   = 400;
  localparam int LAT  = 77;
  localparam int RATE = 77;

  logic   clk = 1'b0;
  logic   rst_n;
  logic   in_valid, in_ready, out_valid, sat_event;
  data_t  x, y;
  coefs_t coefs;

  always #5 clk = ~clk;

  biquad_bit_serial dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_ready(in_ready),
    .x(x), .coefs(coefs),
    .out_valid(out_valid), .y(y), .sat_event(sat_event)
  );

  int checks = 0, failures = 0;
  longint cyc = 0;
  longint w1 = 0, w2 = 0;
  longint exp_y[NS], exp_t[NS], exp_w1[NS], exp_w2[NS];
  longint last_acc = -1;
  int n_acc = 0, n_out = 0, n_clip_ref = 0, n_sat_dut = 0, n_back2back = 0;
  ref_coefs_t rc;
  longint ey_in, ey, et;
  bit clipped;

  function automatic coefs_t to_coefs(ref_coefs_t c);
    coefs_t r;
    r.a2 = coef_t'(c.a2); r.a3 = coef_t'(c.a3);
    r.b1 = coef_t'(c.b1); r.b2 = coef_t'(c.b2);
    return r;
  endfunction

  initial begin
    repeat (NS * (RATE + 4) + 1000) @(posedge clk);
    failures++;
    $display("watchdog: %0d samples accepted, %0d outputs", n_acc, n_out);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // stimulus, changed on the falling edge
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
    @(negedge clk);
    in_valid = 1'b0;
  end

  always @(posedge clk) begin
    cyc++;
    if (rst_n) begin
      if (in_valid && in_ready) begin
        if (last_acc >= 0 && cyc - last_acc == RATE) n_back2back++;
        if (last_acc >= 0 && cyc - last_acc < RATE) begin
          failures++;
          $display("samples accepted %0d clocks apart", cyc - last_acc);
        end
        last_acc = cyc;
        ey_in = ref_step(longint'(x), rc, A1_SHIFT, w1, w2, clipped);
        if (clipped) n_clip_ref++;
        exp_y[n_acc]  = ey_in;
        exp_t[n_acc]  = cyc;
        exp_w1[n_acc] = w1;
        exp_w2[n_acc] = w2;
        n_acc++;
      end
      if (sat_event) n_sat_dut++;
      if (out_valid) begin
        checks += 2;
        if (n_out >= n_acc) begin
          failures++;
          $display("unexpected output");
        end else begin
          ey = exp_y[n_out];
          et = exp_t[n_out];
          if (longint'(y) != ey) begin
            failures++;
            if (failures < 10) $display("sample %0d: y=%0d expected %0d", n_out, y, ey);
          end
          if (cyc - et != LAT) begin
            failures++;
            if (failures < 10) $display("latency %0d expected %0d", cyc - et, LAT);
          end
        end
        n_out++;
        if (n_out == NS) begin
          checks += 3;
          if (n_clip_ref == 0 || n_sat_dut == 0) begin
            failures++;
            $display("saturation never occurred (ref %0d, dut %0d)", n_clip_ref, n_sat_dut);
          end
          if (n_back2back == 0) begin
            failures++;
            $display("no back-to-back samples seen");
          end
          $display("samples %0d, saturations ref %0d dut %0d, back-to-back %0d",
                   n_out, n_clip_ref, n_sat_dut, n_back2back);
          $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
          $finish;
        end
      end
    end
  end
endmodule
