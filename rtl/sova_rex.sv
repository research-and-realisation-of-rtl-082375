// sova_rex: register-exchange path management and soft-value memory of the
// SOVA decoder. Every state owns a TP-deep register of hard decisions and a
// register of reliabilities. On each trellis step (step = 1) state n takes
// over the registers of its surviving predecessor, shifted by one, and puts
// its own new decision (ubit) with reliability delta at the front. Where the
// survivor and the competing predecessor disagree on an older decision, that
// decision's reliability becomes min(old reliability, delta) (Hagenauer's
// update). As in the document's SOVA variant, this soft update is done only
// for the newest SOFT_DEPTH positions (the first half of the truncation path
// by default); the older half is copied unchanged.
//
// After each step the oldest entry of the best state's register is the
// decoder output (out_valid once TP steps have been taken since clr).
// At the end of a block the trellis is terminated in state 0: each flush
// cycle outputs the next entry of state 0's register, so TP-1 flush cycles
// empty it. Outputs are registered and updated at the clock edge of a step:
// the decision about the bit of step i leaves with step i + TP - 1, i.e.
// TP - 1 clock cycles after the edge of step i when steps are back to back
// (truncation path length TP = 28 as in the hardware measurements). clr
// restarts the fill count.
module sova_rex
  import mtbc_pkg::*;
#(
  parameter int TP         = 28,
  parameter int SOFT_DEPTH = TP / 2
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               clr,
  input  logic               step,
  input  logic               flush,
  input  logic [NSTATES-1:0] dec,
  input  logic [NSTATES-1:0] ubit,
  input  rel_t               delta [NSTATES],
  input  rsc_state_t         best,
  output logic               out_valid,
  output logic               out_hard,
  output rel_t               out_rel
);
  logic [TP-1:0] hard [NSTATES];      // index 0 newest, TP-1 oldest
  rel_t          rel  [NSTATES][TP];
  logic [TP-1:0] hard_n [NSTATES];
  rel_t          rel_n  [NSTATES][TP];
  logic [$clog2(TP+1)-1:0] fill;

  always_comb begin
    for (int n = 0; n < NSTATES; n++) begin
      rsc_state_t p, c;
      p = rsc_pred(rsc_state_t'(n), dec[n]);
      c = rsc_pred(rsc_state_t'(n), ~dec[n]);
      hard_n[n][0] = ubit[n];
      rel_n[n][0]  = delta[n];
      for (int j = 1; j < TP; j++) begin
        hard_n[n][j] = hard[p][j-1];
        if (j - 1 < SOFT_DEPTH && hard[p][j-1] != hard[c][j-1] && delta[n] < rel[p][j-1])
          rel_n[n][j] = delta[n];
        else
          rel_n[n][j] = rel[p][j-1];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      for (int n = 0; n < NSTATES; n++) begin
        hard[n] <= '0;
        for (int j = 0; j < TP; j++) rel[n][j] <= '0;
      end
      fill      <= '0;
      out_valid <= 1'b0;
      out_hard  <= 1'b0;
      out_rel   <= '0;
    end else begin
      out_valid <= 1'b0;
      if (clr) begin
        fill <= '0;
      end else if (step) begin
        hard <= hard_n;
        rel  <= rel_n;
        if (int'(fill) < TP - 1) fill <= fill + 1'b1;
        out_valid <= (int'(fill) == TP - 1);
        out_hard  <= hard_n[best][TP-1];
        out_rel   <= rel_n[best][TP-1];
      end else if (flush) begin
        out_valid <= 1'b1;
        out_hard  <= hard[0][TP-2];
        out_rel   <= rel[0][TP-2];
        for (int n = 0; n < NSTATES; n++) begin
          hard[n] <= {hard[n][TP-2:0], 1'b0};
          for (int j = 1; j < TP; j++) rel[n][j] <= rel[n][j-1];
        end
      end
    end
endmodule
