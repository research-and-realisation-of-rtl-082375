// rsc_encoder: recursive systematic convolutional encoder {13,15} (octal),
// memory 3, used for both halves of the modified turbo block code.
//
// Each enabled clock shifts one input bit u through the recursive register;
// the systematic output is u itself, the parity bit par is a combinational
// function of the present state and u (valid in the same cycle as u). The
// state is cleared synchronously by clr or by the active-low reset. The
// polynomials are the document's example code; the single-cycle interface
// with enable and synchronous clear is this design's choice.
module rsc_encoder
  import mtbc_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       clr,     // return to state 0
  input  logic       en,      // shift u in this cycle
  input  logic       u,
  output logic       par,     // parity for (state, u)
  output rsc_state_t state
);
  always_comb par = rsc_par(state, u);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)    state <= '0;
    else if (clr)  state <= '0;
    else if (en)   state <= rsc_next(state, u);
endmodule
