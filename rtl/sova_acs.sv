// sova_acs: add-compare-select unit of the SOVA decoder for the 8-state
// {13,15} trellis. For every new state n the two predecessors (differing in
// their oldest register bit) are extended by their branch metrics; the larger
// sum survives. Besides the decision (dec[n] = oldest bit of the surviving
// predecessor) and the decoded input bit of the surviving branch (ubit[n]),
// the unit delivers the metric difference delta[n] between survivor and
// competitor, which is the SOVA reliability of the decision.
//
// Word lengths follow the document: path metrics and metric differences are
// 7-bit internal words. Path metrics are normalised every step so that the
// best state has metric 0 and the others are negative, and are clipped at
// -64; differences are clipped at 63. The document describes clipping of
// internal results and its effect; the normalisation scheme is this design's.
// On equal sums the predecessor with oldest bit 0 wins. best is the state
// with the largest new metric (lowest index on a tie). Combinational.
module sova_acs
  import mtbc_pkg::*;
(
  input  metric_t                  pm     [NSTATES],
  input  logic signed [W_IN+1:0]   bm     [4],
  output metric_t                  pm_new [NSTATES],
  output logic [NSTATES-1:0]       dec,
  output logic [NSTATES-1:0]       ubit,
  output rel_t                     delta  [NSTATES],
  output rsc_state_t               best
);
  localparam int WS = W_INT + 3;    // width of the un-normalised sums
  typedef logic signed [WS-1:0] sum_t;

  sum_t sel [NSTATES];
  sum_t smax;

  always_comb begin
    for (int n = 0; n < NSTATES; n++) begin
      sum_t       c0, c1, d;
      rsc_state_t p0, p1;
      logic       u0, u1;
      p0 = rsc_pred(rsc_state_t'(n), 1'b0);
      p1 = rsc_pred(rsc_state_t'(n), 1'b1);
      // input bit that leads from the predecessor into n
      u0 = rsc_state_t'(n) == rsc_next(p0, 1'b0) ? 1'b0 : 1'b1;
      u1 = rsc_state_t'(n) == rsc_next(p1, 1'b0) ? 1'b0 : 1'b1;
      c0 = sum_t'(pm[p0]) + sum_t'(bm[{u0, rsc_par(p0, u0)}]);
      c1 = sum_t'(pm[p1]) + sum_t'(bm[{u1, rsc_par(p1, u1)}]);
      if (c1 > c0) begin
        dec[n] = 1'b1; ubit[n] = u1; sel[n] = c1; d = c1 - c0;
      end else begin
        dec[n] = 1'b0; ubit[n] = u0; sel[n] = c0; d = c0 - c1;
      end
      delta[n] = (d > sum_t'(REL_MAX)) ? rel_t'(REL_MAX) : rel_t'(d);
    end

    smax = sel[0];
    best = '0;
    for (int n = 1; n < NSTATES; n++)
      if (sel[n] > smax) begin
        smax = sel[n];
        best = rsc_state_t'(n);
      end

    for (int n = 0; n < NSTATES; n++) begin
      sum_t v;
      v = sel[n] - smax;
      pm_new[n] = (v < sum_t'(PM_MIN)) ? PM_MIN : metric_t'(v);
    end
  end
endmodule
