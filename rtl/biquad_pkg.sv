// biquad_pkg: word lengths, types and shared encodings of the second-order
// IIR section ("biquad") built here in four styles (fully combinational,
// word-serial, combinational-sequential and bit-serial).
//
// All four implementations compute the same bit-true recursion
//   w(n) = sat( (x(n) - (rnd(a2*w(n-1)) + rnd(a3*w(n-2)))) << A1_SHIFT )
//   y(n) = sat( rnd(b1*w(n)) + rnd(b2*w(n-1)) )
// on 20-bit two's complement data with 14-bit two's complement coefficients.
// The 20/14/34-bit word lengths, round-to-nearest of every product and
// saturation of the adders follow the source design; the placement of the
// binary point (14 fraction bits in a coefficient, so that a rounded product
// is again 20 bits) and the shift that realises the leading denominator
// coefficient a(1) are this design's choices.
package biquad_pkg;

  localparam int DATA_W   = 20;               // data bus width
  localparam int COEF_W   = 14;               // coefficient width
  localparam int PROD_W   = DATA_W + COEF_W;  // full product width (34)
  localparam int FRAC_W   = PROD_W - DATA_W;  // bits dropped by rounding (14)
  localparam int A1_SHIFT = 2;                // a(1) = 2**A1_SHIFT, done as a left shift

  typedef logic signed [DATA_W-1:0] data_t;
  typedef logic signed [COEF_W-1:0] coef_t;
  typedef logic signed [PROD_W-1:0] prod_t;

  // Coefficients of one section: H(z) = (b1 + b2 z^-1) / (a1 + a2 z^-1 + a3 z^-2)
  // with a1 fixed to a power of two (see A1_SHIFT).
  typedef struct packed {
    coef_t a2;
    coef_t a3;
    coef_t b1;
    coef_t b2;
  } coefs_t;

  localparam data_t DATA_MAX = {1'b0, {(DATA_W-1){1'b1}}};
  localparam data_t DATA_MIN = {1'b1, {(DATA_W-1){1'b0}}};

  // States of the combinational-sequential controller (one operation each).
  typedef enum logic [2:0] {
    CS_RESET = 3'd0,
    CS_S1    = 3'd1,
    CS_S2    = 3'd2,
    CS_S3    = 3'd3,
    CS_S4    = 3'd4,
    CS_END   = 3'd5
  } cs_state_t;

  // Control word of the bit-serial biquad, decoded from its cycle counter.
  typedef struct packed {
    logic busy;         // a sample is being processed
    logic ps_shift;     // P/S register shifts (arithmetic: sign repeats)
    logic sr1_shift;    // SR1 alignment delay advances
    logic sr2_load;     // SR2 shifts in the new w(n) stream
    logic sr2_rot;      // SR2 recirculates (feeds the b(1) multiplier)
    logic sr2_sat;      // last w(n) bit: saturate SR2 if the word overflowed
    logic w_ref;        // w(n) bit DATA_W-1: reference for overflow detection
    logic w_mon;        // w(n) guard bits: compare with the reference
    logic sr3_shift;    // SR3 takes w(n-1) from SR2, shifts out w(n-2)
    logic sr4_load;     // SR4 takes the rounded b(2) product
    logic sr4_out;      // SR4 shifts the b(2) product out (sign repeats)
    logic sr5_shift;    // SR5 takes the output stream
    logic y_ref;        // y bit DATA_W-1: reference for overflow detection
    logic sr5_sat;      // y guard bit: saturate SR5 if the word overflowed
    logic out_load;     // S/P: parallel output register loads SR5
    logic ma_start;     // first cycle of the a(2), a(3), b(2) multiplications
    logic ma_ext;       // those multipliers repeat the sign bit
    logic mb_start;     // first cycle of the b(1) multiplication
    logic mb_ext;       // b(1) multiplier repeats the sign bit
    logic rnd_a;        // rounding strobe of the a(2), a(3), b(2) products
    logic rnd_b;        // rounding strobe of the b(1) product
    logic add_a_first;  // first bit of the denominator additions
    logic add_b_first;  // first bit of the output addition
    logic dl_clear;     // clear the a(1) shift delay line
    logic wq_valid;     // the a(1) stage output carries w(n) bits
  } bs_ctrl_t;

endpackage
