// tb_serial_adder: adds and subtracts random 21-bit operands bit-serially,
// LSB first, one word after another, and compares the 21 sum bits with
// integer a + b or a - b.
module tb_serial_adder;
  localparam int N = 21;

  logic clk = 1'b0;
  logic rst_n, first, sub, a, b, s;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  serial_adder dut (.clk(clk), .rst_n(rst_n), .first(first), .sub(sub),
                    .a(a), .b(b), .s(s));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; first = 1'b0; sub = 1'b0; a = 1'b0; b = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int op = 0; op < 1000; op++) begin
      logic [N-1:0] av, bv, got, e;
      av  = N'($urandom);
      bv  = N'($urandom);
      if (op % 5 == 0) bv = ~av;               // long carry chains
      sub = 1'($urandom);
      for (int k = 0; k < N; k++) begin
        first = (k == 0);
        a = av[k];
        b = bv[k];
        #1;
        got[k] = s;
        @(negedge clk);
      end
      e = sub ? av - bv : av + bv;
      checks++;
      if (got != e) begin
        failures++;
        if (failures < 10) $display("%h %s %h: got %h exp %h", av, sub ? "-" : "+", bv, got, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
