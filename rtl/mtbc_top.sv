// mtbc_top: modified turbo block codec. The encoder side (mtbc_encoder)
// turns a block of N data bits into systematic bits X and punctured parity
// bits Y of a code whose two halves are both trellis-terminated; the decoder
// side (turbo_decoder) holds a received block of quantised soft values and
// decodes it with iterated SOVA passes. In the document's test system the
// encoder, channel and quantiser run on a PC and only the decoder is on the
// card; here both are brought out side by side so a testbench (or an FPGA
// harness) can play the PC's part between them.
//
// The host bus writes the interleaver table into both the encoder and the
// decoder (host_sel = SEL_PERM), so both always use the same permutation.
// All other host accesses go to the decoder memories. The parallel-port link
// of the document's card is not modelled; the host bus stands in for it.
// The puncturing pattern is a parameter (default rate 1/2); the host has to
// write 0 into PAR1/PAR2 at the positions the pattern removes.
module mtbc_top
  import mtbc_pkg::*;
#(
  parameter int N_MAX = 448,
  parameter int TP    = 28,
  parameter int K_MAX = N_MAX + NT,
  parameter int AW    = $clog2(K_MAX),
  parameter int              PPER = 2,       // puncturing period
  parameter logic [PPER-1:0] PAT1 = 2'b01,   // keep pattern, first half parity
  parameter logic [PPER-1:0] PAT2 = 2'b10    // keep pattern, interleaved half parity
) (
  input  logic            clk,
  input  logic            rst_n,
  // encoder
  input  logic            enc_start,
  input  logic [AW-1:0]   enc_n,
  output logic            enc_busy,
  output logic            enc_done,
  input  logic            d_valid,
  input  logic            d_bit,
  output logic            d_ready,
  output logic            x_valid,
  output logic            x_bit,
  output logic            y_valid,
  output logic            y_bit,
  output logic            y_half,
  // host bus
  input  logic            host_we,
  input  host_sel_t       host_sel,
  input  logic [AW-1:0]   host_addr,
  input  logic [15:0]     host_wdata,
  output logic [15:0]     host_rdata,
  // decoder control
  input  logic [AW-1:0]   dec_n,
  input  logic [3:0]      dec_iter,
  input  logic            dec_mode2,
  input  logic            dec_start,
  output logic            dec_busy,
  output logic            dec_done,
  output logic [3:0]      dec_iter_cnt
);
  rsc_state_t enc_rsc_state;

  mtbc_encoder #(.N_MAX(N_MAX), .K_MAX(K_MAX), .AW(AW), .PPER(PPER), .PAT1(PAT1), .PAT2(PAT2)) u_enc (
    .clk(clk), .rst_n(rst_n), .start(enc_start), .n_len(enc_n),
    .busy(enc_busy), .done(enc_done),
    .d_valid(d_valid), .d_bit(d_bit), .d_ready(d_ready),
    .perm_we(host_we && host_sel == SEL_PERM && !enc_busy),
    .perm_addr(host_addr), .perm_data(host_wdata[AW-1:0]),
    .x_valid(x_valid), .x_bit(x_bit), .y_valid(y_valid), .y_bit(y_bit),
    .y_half(y_half), .rsc_state(enc_rsc_state)
  );

  turbo_decoder #(.N_MAX(N_MAX), .TP(TP), .K_MAX(K_MAX), .AW(AW)) u_dec (
    .clk(clk), .rst_n(rst_n),
    .host_we(host_we), .host_sel(host_sel), .host_addr(host_addr),
    .host_wdata(host_wdata), .host_rdata(host_rdata),
    .cfg_n(dec_n), .cfg_iter(dec_iter), .cfg_mode2(dec_mode2), .start(dec_start),
    .busy(dec_busy), .done(dec_done), .iter_cnt(dec_iter_cnt)
  );

  // Both halves of every encoded block end in the zero state.
  assert property (@(posedge clk) disable iff (!rst_n)
    enc_done |-> (enc_rsc_state == '0));
endmodule
