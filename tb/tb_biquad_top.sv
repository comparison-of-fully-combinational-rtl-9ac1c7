// tb_biquad_top: end-to-end test of biquad_top at its default parameters.
// The same stream of NS samples, with the coefficient set changing every 40
// samples (a stable low-pass section driven by a large step first, then
// random sets), is fed to all four variants, each at its own rate through its
// own handshake, with random idle cycles. Every output of every variant is
// compared with the integer reference model, so the four also agree with
// each other bit for bit. Counted, and required to happen at least once per
// variant: saturation, an idle input cycle while the variant was ready, and
// a coefficient change, and for the three sequential variants a stall (a
// sample offered while the variant was busy); all four must deliver all NS outputs.
module tb_biquad_top;
  import biquad_pkg::*;
  import biquad_ref_pkg::*;

  localparam int NS = 120;
  localparam int NV = 4;            // 0 fc, 1 ws, 2 cs, 3 bs

  logic clk = 1'b0;
  logic rst_n;
  always #5 clk = ~clk;

  logic   [NV-1:0] in_valid, in_ready, out_valid, sat;
  data_t  x   [NV];
  coefs_t cf  [NV];
  data_t  y   [NV];

  biquad_top dut (
    .clk(clk), .rst_n(rst_n),
    .fc_in_valid(in_valid[0]), .fc_x(x[0]), .fc_coefs(cf[0]),
    .fc_out_valid(out_valid[0]), .fc_y(y[0]), .fc_sat(sat[0]),
    .ws_in_valid(in_valid[1]), .ws_in_ready(in_ready[1]), .ws_x(x[1]), .ws_coefs(cf[1]),
    .ws_out_valid(out_valid[1]), .ws_y(y[1]), .ws_sat(sat[1]),
    .cs_in_valid(in_valid[2]), .cs_in_ready(in_ready[2]), .cs_x(x[2]), .cs_coefs(cf[2]),
    .cs_out_valid(out_valid[2]), .cs_y(y[2]), .cs_sat(sat[2]),
    .bs_in_valid(in_valid[3]), .bs_in_ready(in_ready[3]), .bs_x(x[3]), .bs_coefs(cf[3]),
    .bs_out_valid(out_valid[3]), .bs_y(y[3]), .bs_sat(sat[3])
  );
  assign in_ready[0] = 1'b1;

  // stimulus and expected outputs
  data_t      sx [NS];
  ref_coefs_t sc [NS];
  longint     sy [NS];

  int checks = 0, failures = 0;
  int n_in [NV], n_out [NV], n_sat [NV], n_idle [NV], n_cchg [NV], n_stall [NV];
  string name [NV] = '{"fully-combinational", "word-serial", "comb-sequential", "bit-serial"};

  function automatic coefs_t to_coefs(ref_coefs_t c);
    coefs_t r;
    r.a2 = coef_t'(c.a2); r.a3 = coef_t'(c.a3);
    r.b1 = coef_t'(c.b1); r.b2 = coef_t'(c.b2);
    return r;
  endfunction

  initial begin
    ref_state_t st;
    ref_coefs_t rc;
    st = '{0, 0, 0, 1'b0};
    rc = lowpass_coefs();
    for (int i = 0; i < NS; i++) begin
      if (i % 40 == 0 && i > 0) rc = rand_coefs();
      sc[i] = rc;
      if (i < 30)      sx[i] = 20'sd262143;
      else if (i < 40) sx[i] = -20'sd262144;
      else             sx[i] = data_t'(rand_sample());
      st = ref_next(longint'(sx[i]), rc, A1_SHIFT, st);
      sy[i] = st.y;
    end
    for (int v = 0; v < NV; v++) begin
      n_in[v] = 0; n_out[v] = 0; n_sat[v] = 0; n_idle[v] = 0; n_cchg[v] = 0; n_stall[v] = 0;
    end
  end

  initial begin
    repeat (NS * 90 + 2000) @(posedge clk);
    failures++;
    for (int v = 0; v < NV; v++) $display("%s: %0d in, %0d out", name[v], n_in[v], n_out[v]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // drive each variant on the falling edge
  initial begin
    rst_n = 1'b0;
    in_valid = '0;
    for (int v = 0; v < NV; v++) begin x[v] = '0; cf[v] = '0; end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    forever begin
      @(negedge clk);
      for (int v = 0; v < NV; v++) begin
        if (n_in[v] < NS) begin
          in_valid[v] = ($urandom % 6) != 0;
          x[v]  = sx[n_in[v]];
          cf[v] = to_coefs(sc[n_in[v]]);
        end else begin
          in_valid[v] = 1'b0;
        end
      end
    end
  end

  always @(posedge clk) begin
    if (rst_n) begin
      for (int v = 0; v < NV; v++) begin
        if (in_ready[v] && !in_valid[v] && n_in[v] < NS) n_idle[v]++;
        if (in_valid[v] && !in_ready[v]) n_stall[v]++;
        if (in_valid[v] && in_ready[v]) begin
          if (n_in[v] > 0 && sc[n_in[v]] != sc[n_in[v] - 1]) n_cchg[v]++;
          n_in[v]++;
        end
        if (sat[v]) n_sat[v]++;
        if (out_valid[v]) begin
          checks++;
          if (n_out[v] >= n_in[v] || longint'(y[v]) != sy[n_out[v]]) begin
            failures++;
            if (failures < 10)
              $display("%s sample %0d: y=%0d expected %0d", name[v], n_out[v], y[v], sy[n_out[v]]);
          end
          n_out[v]++;
        end
      end
      if (n_out[0] == NS && n_out[1] == NS && n_out[2] == NS && n_out[3] == NS) begin
        for (int v = 0; v < NV; v++) begin
          $display("%s: %0d outputs, %0d saturations, %0d idle inputs, %0d coefficient changes, %0d stalls",
                   name[v], n_out[v], n_sat[v], n_idle[v], n_cchg[v], n_stall[v]);
          checks += 3;
          if (n_sat[v] == 0)  begin failures++; $display("%s: no saturation", name[v]); end
          if (n_idle[v] == 0) begin failures++; $display("%s: no idle input", name[v]); end
          if (n_cchg[v] == 0) begin failures++; $display("%s: no coefficient change", name[v]); end
          if (v > 0) begin
            checks++;
            if (n_stall[v] == 0) begin failures++; $display("%s: no stall", name[v]); end
          end
        end
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    end
  end
endmodule
