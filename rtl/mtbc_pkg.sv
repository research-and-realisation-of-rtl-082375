// mtbc_pkg: constants, types and trellis functions shared by the Modified
// Turbo-Block-Code (MTBC) encoder and the SOVA turbo block decoder.
//
// The component code is the rate-1/2 recursive systematic convolutional (RSC)
// code {13,15} in octal, memory M = 3, eight states. The recursion polynomial
// 13 = 1 + D^2 + D^3 is primitive, so it divides the reset polynomial
// 1 + D^7 (reset length L_RESET = 7), and NT = 3 tail bits return the encoder
// to the zero state. Polynomial coefficients are written with the D^0 term in
// the most significant bit (13 octal = 1011b = 1 + D^2 + D^3). These numbers
// follow the document; the bit ordering of the state vector is this design's
// own choice: st[k-1] holds the register value delayed by k clocks.
//
// Word lengths follow the document's choice of 4-bit soft inputs and outputs
// and 7-bit internal results (path metrics, metric differences, reliabilities).
package mtbc_pkg;

  localparam int M       = 3;                 // encoder memory
  localparam int NSTATES = 1 << M;            // trellis states
  localparam int L_RESET = 7;                 // length l of reset polynomial 1 + D^l
  localparam int NT      = M;                 // tail bits
  localparam logic [M:0] G_FB = 4'b1011;      // 13 octal, recursion
  localparam logic [M:0] G_FF = 4'b1101;      // 15 octal, parity

  localparam int W_IN  = 4;                   // soft input / output word length
  localparam int W_INT = 7;                   // internal result word length

  typedef logic [M-1:0] rsc_state_t;
  typedef logic signed [W_IN-1:0]  soft_t;    // channel value, a-priori, extrinsic
  typedef logic signed [W_INT-1:0] metric_t;  // path metric (always <= 0 after normalisation)
  typedef logic [W_INT-2:0]        rel_t;     // reliability / metric difference, 0 .. 2^(W_INT-1)-1

  localparam metric_t PM_MIN = metric_t'(-(1 << (W_INT-1)));      // clipping floor
  localparam int      REL_MAX = (1 << (W_INT-1)) - 1;

  // Host bus address spaces of the decoder card.
  typedef enum logic [2:0] {
    SEL_SYS  = 3'd0,   // systematic channel values
    SEL_PAR1 = 3'd1,   // parity of the first encoder half (depunctured)
    SEL_PAR2 = 3'd2,   // parity of the interleaved half (depunctured)
    SEL_EXT  = 3'd3,   // extrinsic information (a-priori of decoder 1)
    SEL_PERM = 3'd4,   // interleaver read-address table
    SEL_HARD = 3'd5    // decoded bits (read only)
  } host_sel_t;

  // XOR of the recursion taps on the delayed bits: the feedback value.
  function automatic logic rsc_fb(rsc_state_t st);
    logic f = 1'b0;
    for (int k = 1; k <= M; k++) f ^= G_FB[M-k] & st[k-1];
    return f;
  endfunction

  // Bit that enters the shift register for input u.
  function automatic logic rsc_a(rsc_state_t st, logic u);
    return u ^ rsc_fb(st);
  endfunction

  function automatic rsc_state_t rsc_next(rsc_state_t st, logic u);
    return {st[M-2:0], rsc_a(st, u)};
  endfunction

  function automatic logic rsc_par(rsc_state_t st, logic u);
    logic p = G_FF[M] & rsc_a(st, u);
    for (int k = 1; k <= M; k++) p ^= G_FF[M-k] & st[k-1];
    return p;
  endfunction

  // Predecessor of state n whose oldest register bit is x.
  function automatic rsc_state_t rsc_pred(rsc_state_t n, logic x);
    return {x, n[M-1:1]};
  endfunction

endpackage
