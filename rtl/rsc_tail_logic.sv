// rsc_tail_logic: the termination logic of the MTBC encoder (block "LOGIC"
// in the encoder diagram). It looks at the present state of the RSC encoder
// and produces the input bit that makes the bit entering the shift register
// zero, i.e. the bit equal to the feedback sum. Applied M = 3 times, it drives
// the encoder from any state to the zero state. The document describes this
// function ("a logic circuit inspects the present state ... and generates the
// respective bit") and notes it equals a modulo addition at the encoder input;
// the purely combinational form is this design's choice.
//
// Interface: state in, tail_bit out; no clock, zero latency.
module rsc_tail_logic
  import mtbc_pkg::*;
(
  input  rsc_state_t state,
  output logic       tail_bit
);
  always_comb tail_bit = rsc_fb(state);
endmodule
