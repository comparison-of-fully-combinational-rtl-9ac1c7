// tb_round_unit: checks rounding of 34-bit products to 20 bits (nearest,
// ties upward) against floor((p + 2**13) / 2**14), for random products of a
// 20-bit and a 14-bit number and for exact half-way cases.
module tb_round_unit;
  logic signed [33:0] din;
  logic signed [19:0] dout;
  int checks = 0, failures = 0;

  round_unit #(.IN_W(34), .OUT_W(20)) dut (.din(din), .dout(dout));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 5000; i++) begin
      longint p, e;
      p = longint'($signed(20'($urandom))) * longint'($signed(14'($urandom)));
      case (i % 4)
        0: p = (p & ~longint'(16383)) + 8192;      // exactly one half
        1: p = (p & ~longint'(16383)) + 8191;      // just below one half
        default: ;
      endcase
      if (i == 0) p = 64'sd1 <<< 32;               // largest product
      if (i == 1) p = -(64'sd524288 * 64'sd8191);  // most negative product
      din = 34'(p);
      #1;
      e = (p + 8192) >>> 14;
      checks++;
      if (longint'(dout) != e) begin
        failures++;
        if (failures < 10) $display("round(%0d): got %0d exp %0d", p, dout, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
