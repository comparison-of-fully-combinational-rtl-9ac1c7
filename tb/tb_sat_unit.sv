// tb_sat_unit: checks saturation of 24-bit values to 20 bits: values in range
// pass, others clamp to 2**19-1 or -2**19, and the clipped flag says which.
module tb_sat_unit;
  logic signed [23:0] din;
  logic signed [19:0] dout;
  logic               clipped;
  int checks = 0, failures = 0;

  sat_unit #(.IN_W(24), .OUT_W(20)) dut (.din(din), .dout(dout), .clipped(clipped));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 5000; i++) begin
      longint v, e;
      bit     ec;
      case (i)
        0: v = 524287;
        1: v = 524288;
        2: v = -524288;
        3: v = -524289;
        default: v = (i % 2) ? longint'($signed(24'($urandom))) : longint'($signed(20'($urandom)));
      endcase
      din = 24'(v);
      #1;
      ec = 1'b1;
      if (v > 524287)       e = 524287;
      else if (v < -524288) e = -524288;
      else begin e = v; ec = 1'b0; end
      checks += 2;
      if (longint'(dout) != e) begin
        failures++;
        if (failures < 10) $display("sat(%0d): got %0d exp %0d", v, dout, e);
      end
      if (clipped != ec) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
