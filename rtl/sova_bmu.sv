// sova_bmu: branch metric computation of the SOVA decoder. For the rate-1/2
// RSC code every trellis branch carries a systematic bit u and a parity bit p.
// With soft values as log-likelihood ratios (positive means bit 1) the
// branch metric to be maximised is
//     bm(u,p) = u*(ys + la) + p*yp
// with ys the systematic channel value, la the a-priori value (extrinsic of
// the other decoder) and yp the parity channel value, all 4-bit two's
// complement. The 0/1 weighting differs from the +-1 correlation only by a
// per-step constant and a factor of two, so metric differences come out
// directly in input LLR units. A punctured parity bit is delivered as 0.
// The document names the block (BMC) and its inputs; the formula is this
// design's choice. Combinational; bm is indexed by {u,p}.
module sova_bmu
  import mtbc_pkg::*;
(
  input  soft_t                    ys,
  input  soft_t                    la,
  input  soft_t                    yp,
  output logic signed [W_IN+1:0]   bm [4],
  output logic signed [W_IN:0]     intrinsic   // ys + la, for the extrinsic
);
  always_comb begin
    intrinsic = (W_IN+1)'(ys) + (W_IN+1)'(la);
    bm[0] = '0;                                           // u=0, p=0
    bm[1] = (W_IN+2)'(yp);                                // u=0, p=1
    bm[2] = (W_IN+2)'(intrinsic);                         // u=1, p=0
    bm[3] = (W_IN+2)'(intrinsic) + (W_IN+2)'(yp);         // u=1, p=1
  end
endmodule
