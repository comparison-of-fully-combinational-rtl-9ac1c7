// biquad_top: the four implementations of the same bit-true biquad, side by
// side: fully combinational (fc_), word-serial (ws_), combinational-
// sequential (cs_) and bit-serial (bs_). They share the clock and the
// active-low synchronous reset; each has its own sample handshake,
// coefficients and output, so they can be run on the same or on different
// streams. For the combinational-sequential section, which takes its state
// variables as inputs and returns the next ones (a section can be time-
// shared that way), the top feeds the returned state back.
// Samples per clock: fc 1, ws 1/56, cs 1/6, bs 1/77 (see each module).
// Placing the four variants next to each other for comparison follows the
// source design; the port grouping is this design's choice.
module biquad_top
  import biquad_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  // fully combinational
  input  logic   fc_in_valid,
  input  data_t  fc_x,
  input  coefs_t fc_coefs,
  output logic   fc_out_valid,
  output data_t  fc_y,
  output logic   fc_sat,
  // word-serial
  input  logic   ws_in_valid,
  output logic   ws_in_ready,
  input  data_t  ws_x,
  input  coefs_t ws_coefs,
  output logic   ws_out_valid,
  output data_t  ws_y,
  output logic   ws_sat,
  // combinational-sequential
  input  logic   cs_in_valid,
  output logic   cs_in_ready,
  input  data_t  cs_x,
  input  coefs_t cs_coefs,
  output logic   cs_out_valid,
  output data_t  cs_y,
  output logic   cs_sat,
  // bit-serial
  input  logic   bs_in_valid,
  output logic   bs_in_ready,
  input  data_t  bs_x,
  input  coefs_t bs_coefs,
  output logic   bs_out_valid,
  output data_t  bs_y,
  output logic   bs_sat
);
  biquad_comb u_fc (
    .clk(clk), .rst_n(rst_n), .in_valid(fc_in_valid), .x(fc_x), .coefs(fc_coefs),
    .out_valid(fc_out_valid), .y(fc_y), .sat_event(fc_sat)
  );

  biquad_word_serial u_ws (
    .clk(clk), .rst_n(rst_n), .in_valid(ws_in_valid), .in_ready(ws_in_ready),
    .x(ws_x), .coefs(ws_coefs), .out_valid(ws_out_valid), .y(ws_y), .sat_event(ws_sat)
  );

  // state variables of the combinational-sequential section: its
  // next-state output registers hold them between samples
  data_t cs_v1, cs_v2;

  biquad_comb_seq u_cs (
    .clk(clk), .rst_n(rst_n), .in_valid(cs_in_valid), .in_ready(cs_in_ready),
    .x(cs_x), .coefs(cs_coefs), .v1_prev(cs_v1), .v2_prev(cs_v2),
    .out_valid(cs_out_valid), .y(cs_y), .v1_next(cs_v1), .v2_next(cs_v2),
    .sat_event(cs_sat)
  );

  biquad_bit_serial u_bs (
    .clk(clk), .rst_n(rst_n), .in_valid(bs_in_valid), .in_ready(bs_in_ready),
    .x(bs_x), .coefs(bs_coefs), .out_valid(bs_out_valid), .y(bs_y), .sat_event(bs_sat)
  );
endmodule
