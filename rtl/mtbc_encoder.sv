// mtbc_encoder: modified turbo block encoder. One RSC encoder codes a block in
// two halves separated by zero padding, so that both halves start and end in
// the zero state and each decoder of an iteration sees a terminated trellis.
//
//   DATA : N data bits (d_valid/d_ready handshake) go to the RSC, into the
//          interleaver buffer and out as systematic bits X (switch S1 on data).
//   TAIL : NT = 3 tail bits from rsc_tail_logic drive the RSC to state 0; they
//          are also stored in the interleaver and sent as X (S1 on tail).
//   ZERO : N0 zero bits fill the stream up to a multiple of the reset length
//          l = 7 (eq. 3.6: N0 = i*l - (N+NT)); the interleaver is not clocked
//          and the encoder output is dropped (S3 on zero). A mod-7 position
//          counter replaces the division. One extra cycle passes here even
//          when N0 = 0.
//   INTL : the K = N+NT interleaved bits go through the same RSC (S2 on the
//          interleaver); only their parity is sent.
//
// Parity bits of DATA/TAIL (first half, out_half = 0) and of INTL (second
// half, out_half = 1) pass the puncturer and appear as y_valid/y_bit; the
// systematic bits appear as x_valid/x_bit. Both are single-cycle strobes.
// The block length N is a run-time input (1 .. N_MAX, at least the decoder's
// truncation length in practice), which is the document's "variable block
// length". The sequence of switches follows the document; the handshake,
// the zero-cycle detail and the per-cycle output strobes are this design's.
// Throughput: one coded bit per clock, K + N0 + 1 + K cycles per block
// after the data have been accepted without stalls.
module mtbc_encoder
  import mtbc_pkg::*;
#(
  parameter int N_MAX  = 448,
  parameter int K_MAX  = N_MAX + NT,
  parameter int AW     = $clog2(K_MAX),
  parameter int PPER   = 2,
  parameter logic [PPER-1:0] PAT1 = 2'b01,
  parameter logic [PPER-1:0] PAT2 = 2'b10
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,      // begin a block (ignored while busy)
  input  logic [AW-1:0] n_len,      // data bits in this block
  output logic          busy,
  output logic          done,       // one-cycle pulse after the last parity bit
  // data in
  input  logic          d_valid,
  input  logic          d_bit,
  output logic          d_ready,
  // interleaver table load
  input  logic          perm_we,
  input  logic [AW-1:0] perm_addr,
  input  logic [AW-1:0] perm_data,
  // coded output
  output logic          x_valid,
  output logic          x_bit,
  output logic          y_valid,
  output logic          y_bit,
  output logic          y_half,
  output rsc_state_t    rsc_state   // encoder state, for observation
);
  typedef enum logic [2:0] {S_IDLE, S_DATA, S_TAIL, S_ZERO, S_INTL} enc_state_e;
  enc_state_e st;

  logic [AW-1:0] idx;        // position within the current half
  logic [AW-1:0] n_reg;
  logic [2:0]    pos_mod;    // stream position modulo L_RESET
  logic          tail_bit, ilv_bit, rsc_u, rsc_en, rsc_p, punct_restart;
  logic [AW-1:0] ilv_src;    // table entry of the current read (not needed here)
  logic          par_valid;

  rsc_tail_logic u_tail (.state(rsc_state), .tail_bit(tail_bit));

  mtbc_interleaver #(.K_MAX(K_MAX), .AW(AW)) u_ilv (
    .clk(clk),
    .wr_en(rsc_en && (st == S_DATA || st == S_TAIL)),
    .wr_addr(idx), .wr_bit(rsc_u),
    .perm_we(perm_we), .perm_addr(perm_addr), .perm_data(perm_data),
    .rd_idx(idx), .rd_bit(ilv_bit), .rd_src(ilv_src)
  );

  rsc_encoder u_rsc (
    .clk(clk), .rst_n(rst_n), .clr(st == S_IDLE), .en(rsc_en), .u(rsc_u),
    .par(rsc_p), .state(rsc_state)
  );

  puncturer #(.PERIOD(PPER), .PAT1(PAT1), .PAT2(PAT2)) u_punct (
    .clk(clk), .rst_n(rst_n), .restart(punct_restart),
    .in_valid(par_valid), .in_half(st == S_INTL), .in_par(rsc_p),
    .out_valid(y_valid), .out_par(y_bit)
  );

  // Switches S1 (data/tail), S2 (direct/interleaver), S3 (zero insertion).
  always_comb begin
    rsc_u  = 1'b0;
    rsc_en = 1'b0;
    unique case (st)
      S_DATA: begin rsc_u = d_bit;    rsc_en = d_valid; end
      S_TAIL: begin rsc_u = tail_bit; rsc_en = 1'b1;    end
      S_ZERO: begin rsc_u = 1'b0;     rsc_en = (pos_mod != 3'd0); end
      S_INTL: begin rsc_u = ilv_bit;  rsc_en = 1'b1;    end
      default: ;
    endcase
  end

  always_comb begin
    d_ready       = (st == S_DATA);
    x_valid       = rsc_en && (st == S_DATA || st == S_TAIL);
    x_bit         = rsc_u;
    par_valid     = rsc_en && (st != S_ZERO);
    y_half        = (st == S_INTL);
    busy          = (st != S_IDLE);
    punct_restart = (st == S_IDLE) || (st == S_ZERO && pos_mod == 3'd0);
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      st      <= S_IDLE;
      idx     <= '0;
      n_reg   <= '0;
      pos_mod <= '0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      if (rsc_en && st != S_INTL)
        pos_mod <= (pos_mod == 3'(L_RESET-1)) ? 3'd0 : pos_mod + 3'd1;
      unique case (st)
        S_IDLE: if (start) begin
          st      <= S_DATA;
          idx     <= '0;
          pos_mod <= '0;
          n_reg   <= n_len;
        end
        S_DATA: if (d_valid) begin
          idx <= idx + 1'b1;
          if (idx + 1'b1 == n_reg) st <= S_TAIL;
        end
        S_TAIL: begin
          idx <= idx + 1'b1;
          if (idx + 1'b1 == n_reg + AW'(NT)) st <= S_ZERO;
        end
        S_ZERO: if (pos_mod == 3'd0) begin
          st  <= S_INTL;
          idx <= '0;
        end
        S_INTL: begin
          idx <= idx + 1'b1;
          if (idx + 1'b1 == n_reg + AW'(NT)) begin
            st   <= S_IDLE;
            done <= 1'b1;
          end
        end
        default: st <= S_IDLE;
      endcase
    end

  // The tail must have returned the encoder to the zero state.
  assert property (@(posedge clk) disable iff (!rst_n)
    (st == S_ZERO) |-> (rsc_state == '0));
endmodule
