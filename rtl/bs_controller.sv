// bs_controller: controller of the bit-serial biquad.
// A cycle counter runs from 0 to CYCLES-1 while a sample is processed and
// its count is decoded into the shift, load and strobe signals that keep the
// bits of every word in order (bs_ctrl_t in biquad_pkg). With W data bits,
// F dropped product bits and the a(1) shift A:
//   phase A, cycles 0 .. 2W-1: w(n-1), w(n-2) stream out of SR2/SR3 into the
//     a(2), a(3) and b(2) multipliers (W bits, then W sign bits); their
//     rounded products start at cycle F; x leaves SR1 aligned with them;
//     w(n) = (x - s) << A enters SR2 at cycles F .. F+W-1 and is saturated
//     at cycle F+W+1+A; the rounded b(2) product enters SR4.
//   phase B, cycles 2W .. 2W+F+W+1: SR2 recirculates into the b(1)
//     multiplier; its rounded product plus SR4 enters SR5 at cycles
//     2W+F .. 2W+F+W-1, is saturated at the next cycle and loaded into the
//     output register one cycle later.
// A sample is accepted (start) only when idle; done pulses with out_load.
// The controller that enables the storage elements so that only correctly
// ordered bits are kept follows the source design; the cycle plan is this
// design's choice.
module bs_controller
  import biquad_pkg::*;
#(
  parameter int W = DATA_W,
  parameter int F = FRAC_W,
  parameter int A = A1_SHIFT
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     start,
  output bs_ctrl_t ctrl,
  output logic     ready
);
  localparam int PH_B   = 2 * W;            // start of phase B
  localparam int CYCLES = PH_B + F + W + 2;  // busy cycles per sample
  localparam int CNT_W  = $clog2(CYCLES + 1);

  initial assert (F + W + 2 + A <= PH_B)
    else $error("a(1) shift too large for the cycle plan");

  logic             busy;
  logic [CNT_W-1:0] cnt;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy <= 1'b0;
      cnt  <= '0;
    end else if (!busy) begin
      busy <= start;
      cnt  <= '0;
    end else if (cnt == CNT_W'(CYCLES - 1)) begin
      busy <= 1'b0;
      cnt  <= '0;
    end else begin
      cnt <= cnt + 1'b1;
    end
  end

  assign ready = !busy;

  always_comb begin
    int c;
    c    = int'(cnt);
    ctrl = '0;
    if (busy) begin
      ctrl.busy        = 1'b1;
      ctrl.ps_shift    = (c < PH_B);
      ctrl.sr1_shift   = (c < PH_B);
      ctrl.sr3_shift   = (c < W);
      ctrl.ma_start    = (c == 0);
      ctrl.ma_ext      = (c >= W);
      ctrl.rnd_a       = (c == F - 1);
      ctrl.add_a_first = (c == F);
      ctrl.dl_clear    = (c == F - 1);
      ctrl.wq_valid    = (c >= F);
      ctrl.sr2_load    = (c < F + W);
      ctrl.w_ref       = (c == F + W - 1);
      ctrl.w_mon       = (c >= F + W) && (c < F + W + 1 + A);
      ctrl.sr2_sat     = (c == F + W + 1 + A);
      ctrl.sr4_load    = (c >= F) && (c < F + W);
      ctrl.sr2_rot     = (c >= PH_B) && (c < PH_B + W);
      ctrl.mb_start    = (c == PH_B);
      ctrl.mb_ext      = (c >= PH_B + W);
      ctrl.rnd_b       = (c == PH_B + F - 1);
      ctrl.add_b_first = (c == PH_B + F);
      ctrl.sr4_out     = (c >= PH_B + F) && (c < PH_B + F + W + 1);
      ctrl.sr5_shift   = (c >= PH_B + F) && (c < PH_B + F + W);
      ctrl.y_ref       = (c == PH_B + F + W - 1);
      ctrl.sr5_sat     = (c == PH_B + F + W);
      ctrl.out_load    = (c == PH_B + F + W + 1);
    end
  end
endmodule
