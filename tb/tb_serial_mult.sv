// tb_serial_mult: feeds random 20-bit data LSB first (20 data cycles, then 20
// sign-extension cycles with ext high) into the bit-serial multiplier with a
// random 14-bit coefficient, collects the 40 product bits and compares the
// low 34 with the integer product and the upper 6 with its sign. Operations
// follow each other without idle cycles; one operation is 2n = 40 clocks.
module tb_serial_mult;
  localparam int N = 20;
  localparam int CW = 14;

  logic clk = 1'b0;
  logic rst_n, start, ext, x_bit, p_bit;
  logic signed [CW-1:0] coef;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  serial_mult #(.CW(CW)) dut (.clk(clk), .rst_n(rst_n), .start(start), .ext(ext),
                              .x_bit(x_bit), .coef(coef), .p_bit(p_bit));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; start = 1'b0; ext = 1'b0; x_bit = 1'b0; coef = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int op = 0; op < 1000; op++) begin
      logic signed [N-1:0] xv;
      logic [2*N-1:0] got;
      longint e;
      xv   = N'($urandom);
      coef = CW'($urandom);
      if (op == 0) begin xv = {1'b1, {(N-1){1'b0}}}; coef = {1'b1, {(CW-1){1'b0}}}; end
      if (op == 1) begin xv = {1'b1, {(N-1){1'b0}}}; coef = {1'b0, {(CW-1){1'b1}}}; end
      for (int k = 0; k < 2 * N; k++) begin
        start = (k == 0);
        ext   = (k >= N);
        x_bit = (k < N) ? xv[k] : 1'($urandom);   // ignored while ext
        #1;
        got[k] = p_bit;
        @(negedge clk);
      end
      e = longint'(xv) * longint'(coef);
      checks++;
      if (got != (2*N)'(e)) begin
        failures++;
        if (failures < 10) $display("%0d * %0d: got %h exp %h", xv, coef, got, (2*N)'(e));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
