// tb_bw_mult: checks the Baugh-Wooley array multiplier (20 x 14 bits) against
// integer multiplication, including the most negative operands.
module tb_bw_mult;
  logic signed [19:0] a;
  logic signed [13:0] b;
  logic signed [33:0] p;
  int checks = 0, failures = 0;

  bw_mult #(.AW(20), .BW(14)) dut (.a(a), .b(b), .p(p));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 5000; i++) begin
      longint e;
      case (i)
        0: begin a = 20'sh80000; b = 14'sh2000; end
        1: begin a = 20'sh7ffff; b = 14'sh2000; end
        2: begin a = 20'sh80000; b = 14'sh1fff; end
        3: begin a = 20'sh7ffff; b = 14'sh1fff; end
        4: begin a = '0;         b = 14'sh2000; end
        5: begin a = -20'sd1;    b = -14'sd1;   end
        default: begin a = 20'($urandom); b = 14'($urandom); end
      endcase
      #1;
      e = longint'(a) * longint'(b);
      checks++;
      if (longint'(p) != e) begin
        failures++;
        if (failures < 10) $display("%0d * %0d: got %0d exp %0d", a, b, p, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
