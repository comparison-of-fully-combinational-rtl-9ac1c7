// tb_cla_adder: checks the carry look-ahead adder against integer addition
// at widths 34 and 22 (a width that is not a multiple of the group size),
// with random and corner operands and both carry-in values.
module tb_cla_adder;
  localparam int W1 = 34;
  localparam int W2 = 22;

  logic [W1-1:0] a1, b1, s1;
  logic          ci1, co1;
  logic [W2-1:0] a2, b2, s2;
  logic          ci2, co2;
  int checks = 0, failures = 0;

  cla_adder #(.W(W1)) dut1 (.a(a1), .b(b1), .cin(ci1), .sum(s1), .cout(co1));
  cla_adder #(.W(W2)) dut2 (.a(a2), .b(b2), .cin(ci2), .sum(s2), .cout(co2));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4000; i++) begin
      logic [W1:0] e1;
      logic [W2:0] e2;
      case (i % 5)
        0: begin a1 = '1; b1 = W1'($urandom & 1); a2 = '1; b2 = W2'($urandom & 1); end
        1: begin a1 = {$urandom, $urandom}; b1 = ~a1; a2 = W2'($urandom); b2 = ~a2; end
        default: begin
          a1 = {$urandom, $urandom}; b1 = {$urandom, $urandom};
          a2 = W2'($urandom);        b2 = W2'($urandom);
        end
      endcase
      ci1 = 1'($urandom); ci2 = 1'($urandom);
      #1;
      e1 = {1'b0, a1} + {1'b0, b1} + (W1+1)'(ci1);
      e2 = {1'b0, a2} + {1'b0, b2} + (W2+1)'(ci2);
      checks += 2;
      if ({co1, s1} !== e1) begin
        failures++;
        if (failures < 10) $display("W34 %h+%h+%b: got %h exp %h", a1, b1, ci1, {co1, s1}, e1);
      end
      if ({co2, s2} !== e2) begin
        failures++;
        if (failures < 10) $display("W22 %h+%h+%b: got %h exp %h", a2, b2, ci2, {co2, s2}, e2);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
