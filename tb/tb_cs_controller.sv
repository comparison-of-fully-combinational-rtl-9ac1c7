// tb_cs_controller: checks the six-state controller: after reset it waits in
// CS_RESET while start is low, then walks CS_S1 .. CS_END one state per clock
// and returns to CS_RESET; ready is high only in CS_RESET and done only in
// CS_END. Each run through the states is checked against the expected
// sequence, with random idle gaps between runs.
module tb_cs_controller;
  import biquad_pkg::*;

  logic      clk = 1'b0;
  logic      rst_n, start, ready, done;
  cs_state_t state;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  cs_controller dut (.clk(clk), .rst_n(rst_n), .start(start), .state(state),
                     .ready(ready), .done(done));

  task automatic expect_state(cs_state_t s);
    checks += 3;
    if (state != s) begin
      failures++;
      $display("state %0d expected %0d", state, s);
    end
    if (ready != (s == CS_RESET)) failures++;
    if (done != (s == CS_END)) failures++;
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0;
    start = 1'b1;
    repeat (2) @(negedge clk);
    expect_state(CS_RESET);
    rst_n = 1'b1;
    start = 1'b0;
    for (int run = 0; run < 50; run++) begin
      int gap;
      gap = $urandom % 4;
      repeat (gap) begin
        @(negedge clk);
        expect_state(CS_RESET);
      end
      start = 1'b1;
      @(negedge clk);
      start = 1'($urandom);    // start is ignored outside CS_RESET
      expect_state(CS_S1);
      @(negedge clk); expect_state(CS_S2);
      @(negedge clk); expect_state(CS_S3);
      @(negedge clk); expect_state(CS_S4);
      @(negedge clk); expect_state(CS_END);
      start = 1'b0;
      @(negedge clk); expect_state(CS_RESET);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
