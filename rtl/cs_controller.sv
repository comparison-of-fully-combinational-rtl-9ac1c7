// cs_controller: state machine of the combinational-sequential biquad.
// Six states, one operation slot per clock:
//   CS_RESET -> CS_S1 -> CS_S2 -> CS_S3 -> CS_S4 -> CS_END -> CS_RESET
// CS_RESET is the state after reset and the state in which a new input
// sample is accepted: the machine stays there until start is high, and
// leaves it on the same edge. The datapath decodes the state into its
// multiplexer selects and register enables.
// Outputs: state (current state), ready (high in CS_RESET), done (high
// in CS_END, the cycle whose edge produces the output sample).
// The six states and their chain follow the source design; waiting for a
// sample in CS_RESET and the return from CS_END to CS_RESET are this
// design's choices.
module cs_controller
  import biquad_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      start,
  output cs_state_t state,
  output logic      ready,
  output logic      done
);
  cs_state_t next;

  always_comb begin
    unique case (state)
      CS_RESET: next = start ? CS_S1 : CS_RESET;
      CS_S1:    next = CS_S2;
      CS_S2:    next = CS_S3;
      CS_S3:    next = CS_S4;
      CS_S4:    next = CS_END;
      CS_END:   next = CS_RESET;
      default:  next = CS_RESET;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) state <= CS_RESET;
    else        state <= next;
  end

  assign ready = (state == CS_RESET);
  assign done  = (state == CS_END);
endmodule
