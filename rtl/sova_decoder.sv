// sova_decoder: soft-input soft-output Viterbi (SOVA) decoder for one
// terminated half of a modified turbo block code. It chains the branch metric
// unit (sova_bmu), the add-compare-select unit (sova_acs) with its path
// metric registers, the register-exchange path and soft-value memory
// (sova_rex) and the soft-value computation at the output.
//
// Operation: `start` puts the trellis in state 0 (metric 0, all other states
// at the clipping floor). Each `step` cycle consumes one trellis step (ys,
// la, yp). After the last step the controller gives TP-1 `flush` cycles,
// which read the remaining decisions from the zero-state path, since both
// halves of an MTBC block end in state 0. One decision per step or flush
// cycle appears on out_* TP - 1 clock cycles after the clock edge of its own
// step (truncation path length TP, output registered), in input order.
//
// Soft output: out_llr = +rel for a decided 1, -rel for a 0 (7-bit word).
// out_ext is the extrinsic information, out_llr minus the intrinsic part
// (ys + la) of the same position, saturated to the 4-bit output word. The
// intrinsic values travel in a TP-deep delay line alongside the decisions.
// The document fixes the algorithm, TP and the 4/7-bit word lengths; the
// exact extrinsic formula and saturation are this design's choices.
module sova_decoder
  import mtbc_pkg::*;
#(
  parameter int TP         = 28,
  parameter int SOFT_DEPTH = TP / 2
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  logic            step,
  input  logic            flush,
  input  soft_t           ys,
  input  soft_t           la,
  input  soft_t           yp,
  output logic            out_valid,
  output logic            out_hard,
  output metric_t         out_llr,
  output soft_t           out_ext
);
  typedef logic signed [W_IN:0] intr_t;

  metric_t                pm [NSTATES];
  metric_t                pm_new [NSTATES];
  logic signed [W_IN+1:0] bm [4];
  intr_t                  intrinsic;
  logic [NSTATES-1:0]     dec, ubit;
  rel_t                   delta [NSTATES];
  rsc_state_t             best;
  intr_t                  intr_dl [TP];     // index 0 newest
  intr_t                  intr_out;
  rel_t                   rex_rel;
  logic                   rex_hard;

  sova_bmu u_bmu (.ys(ys), .la(la), .yp(yp), .bm(bm), .intrinsic(intrinsic));

  sova_acs u_acs (.pm(pm), .bm(bm), .pm_new(pm_new), .dec(dec), .ubit(ubit),
                  .delta(delta), .best(best));

  sova_rex #(.TP(TP), .SOFT_DEPTH(SOFT_DEPTH)) u_rex (
    .clk(clk), .rst_n(rst_n), .clr(start), .step(step), .flush(flush),
    .dec(dec), .ubit(ubit), .delta(delta), .best(best),
    .out_valid(out_valid), .out_hard(rex_hard), .out_rel(rex_rel)
  );

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      for (int s = 0; s < NSTATES; s++) pm[s] <= (s == 0) ? metric_t'(0) : PM_MIN;
      for (int j = 0; j < TP; j++) intr_dl[j] <= '0;
      intr_out <= '0;
    end else if (start) begin
      for (int s = 0; s < NSTATES; s++) pm[s] <= (s == 0) ? metric_t'(0) : PM_MIN;
    end else if (step || flush) begin
      if (step) pm <= pm_new;
      // the intrinsic value of the position that leaves the path memory now
      intr_out   <= intr_dl[TP-2];
      intr_dl[0] <= step ? intrinsic : intr_t'(0);
      for (int j = 1; j < TP; j++) intr_dl[j] <= intr_dl[j-1];
    end

  always_comb begin
    logic signed [W_INT+1:0] e;
    out_hard = rex_hard;
    out_llr  = rex_hard ? metric_t'(rex_rel) : -metric_t'(rex_rel);
    e = (W_INT+2)'(out_llr) - (W_INT+2)'(intr_out);
    if (e > (W_INT+2)'((1 << (W_IN-1)) - 1))   out_ext = soft_t'((1 << (W_IN-1)) - 1);
    else if (e < -(W_INT+2)'(1 << (W_IN-1)))   out_ext = soft_t'(-(1 << (W_IN-1)));
    else                                       out_ext = soft_t'(e);
  end

  // A step and a flush never coincide.
  assert property (@(posedge clk) disable iff (!rst_n) !(step && flush));
endmodule
