// turbo_decoder: core of the turbo-block-decoder card. It holds one received
// MTBC block and runs turbo iterations on it with a single SOVA decoder that
// is time-shared between the two component decoders of an iteration.
//
// Memories (written and read by the host over a word-wide bus, host_sel
// selects the space, see mtbc_pkg::host_sel_t):
//   SYS  : K = N + 3 systematic channel values (data and tail bits)
//   PAR1 : K parity values of the first half, 0 where punctured
//   PAR2 : K parity values of the interleaved half, 0 where punctured
//   EXT  : K extrinsic values of decoder 2, natural order; the a-priori
//          input of decoder 1
//   PERM : interleaver table, output position q reads input position PERM[q]
//   HARD : K decisions of decoder 2 of the last iteration, natural order
// Internal: E1, the extrinsic values of decoder 1 (natural order).
//
// One iteration = pass 1 (natural order, decoder 1: ys = SYS[j],
// la = EXT[j], yp = PAR1[j], result into E1[j]) followed by pass 2
// (interleaved order, decoder 2: ys = SYS[PERM[q]], la = E1[PERM[q]],
// yp = PAR2[q], result into EXT[PERM[q]] and HARD[PERM[q]], which is the
// deinterleaving). Each pass is K steps, TP-1 flush cycles and a short drain.
//
// Modes (Fig. 6.2 of the test system): mode 1 runs exactly one iteration
// with the extrinsic values the host has loaded and hands the new ones back;
// mode 2 runs cfg_iter iterations starting from zero a-priori values and the
// host reads HARD. The memories, the pass sequencing and the zero a-priori
// start of mode 2 are this design's implementation of the functions the
// document lists. Run time: cfg_iter * 2 * (K + TP + 3) + 1 clock cycles
// from the start strobe to the done pulse (mode 1: one iteration).
module turbo_decoder
  import mtbc_pkg::*;
#(
  parameter int N_MAX = 448,
  parameter int TP    = 28,
  parameter int K_MAX = N_MAX + NT,
  parameter int AW    = $clog2(K_MAX)
) (
  input  logic            clk,
  input  logic            rst_n,
  // host bus
  input  logic            host_we,
  input  host_sel_t       host_sel,
  input  logic [AW-1:0]   host_addr,
  input  logic [15:0]     host_wdata,
  output logic [15:0]     host_rdata,
  // control
  input  logic [AW-1:0]   cfg_n,      // data bits per block
  input  logic [3:0]      cfg_iter,   // iterations in mode 2 (1..15)
  input  logic            cfg_mode2,  // 0: mode 1, 1: mode 2
  input  logic            start,
  output logic            busy,
  output logic            done,       // one-cycle pulse
  output logic [3:0]      iter_cnt    // iterations completed
);
  typedef enum logic [2:0] {D_IDLE, D_STEP, D_FLUSH, D_DRAIN, D_NEXT} dec_state_e;
  dec_state_e st;

  soft_t mem_sys  [K_MAX];
  soft_t mem_par1 [K_MAX];
  soft_t mem_par2 [K_MAX];
  soft_t mem_ext  [K_MAX];
  soft_t mem_e1   [K_MAX];
  logic  mem_hard [K_MAX];

  logic          pass2;         // 0: decoder 1, 1: decoder 2
  logic          first_iter;
  logic [AW-1:0] k_reg;
  logic [AW-1:0] in_idx, out_idx;
  logic [$clog2(TP)-1:0] fl_cnt;
  logic [3:0]    iter_goal;
  logic [AW-1:0] perm_in, perm_out;
  logic [AW-1:0] a_in;          // memory address of the step input
  logic [AW-1:0] a_out;         // memory address of the decoder output
  soft_t         ys, la, yp;
  logic          sd_start, sd_step, sd_flush;
  logic          o_valid, o_hard;
  soft_t         o_ext;
  metric_t       o_llr;      // full soft output (not needed here)

  // Interleaver table: port a for the step input, port b for the output.
  perm_ram #(.DEPTH(K_MAX), .AW(AW)) u_perm (
    .clk(clk),
    .we(host_we && host_sel == SEL_PERM && !busy),
    .waddr(host_addr), .wdata(host_wdata[AW-1:0]),
    .raddr_a(busy ? in_idx : host_addr), .rdata_a(perm_in),
    .raddr_b(out_idx), .rdata_b(perm_out)
  );

  sova_decoder #(.TP(TP)) u_sova (
    .clk(clk), .rst_n(rst_n), .start(sd_start), .step(sd_step), .flush(sd_flush),
    .ys(ys), .la(la), .yp(yp),
    .out_valid(o_valid), .out_hard(o_hard), .out_llr(o_llr), .out_ext(o_ext)
  );

  always_comb begin
    a_in  = pass2 ? perm_in  : in_idx;
    a_out = pass2 ? perm_out : out_idx;
    ys    = (int'(a_in) < K_MAX) ? mem_sys[a_in] : '0;
    if (pass2)
      la = (int'(a_in) < K_MAX) ? mem_e1[a_in] : '0;
    else
      la = (first_iter && cfg_mode2) ? '0 : ((int'(a_in) < K_MAX) ? mem_ext[a_in] : '0);
    if (int'(in_idx) < K_MAX)
      yp = pass2 ? mem_par2[in_idx] : mem_par1[in_idx];
    else
      yp = '0;
    sd_step  = (st == D_STEP) && !sd_start;
    sd_flush = (st == D_FLUSH);
    busy     = (st != D_IDLE);
  end

  // host read port
  always_comb begin
    host_rdata = '0;
    if (int'(host_addr) < K_MAX)
      unique case (host_sel)
        SEL_SYS:  host_rdata = 16'(signed'(mem_sys[host_addr]));
        SEL_PAR1: host_rdata = 16'(signed'(mem_par1[host_addr]));
        SEL_PAR2: host_rdata = 16'(signed'(mem_par2[host_addr]));
        SEL_EXT:  host_rdata = 16'(signed'(mem_ext[host_addr]));
        SEL_PERM: host_rdata = 16'(perm_in);
        SEL_HARD: host_rdata = 16'(mem_hard[host_addr]);
        default:  host_rdata = '0;
      endcase
  end

  // host writes (only while idle) and decoder result writes
  always_ff @(posedge clk) begin
    if (!busy && host_we && int'(host_addr) < K_MAX) begin
      unique case (host_sel)
        SEL_SYS:  mem_sys[host_addr]  <= soft_t'(host_wdata);
        SEL_PAR1: mem_par1[host_addr] <= soft_t'(host_wdata);
        SEL_PAR2: mem_par2[host_addr] <= soft_t'(host_wdata);
        SEL_EXT:  mem_ext[host_addr]  <= soft_t'(host_wdata);
        default: ;
      endcase
    end
    if (busy && o_valid && int'(a_out) < K_MAX) begin
      if (pass2) begin
        mem_ext[a_out]  <= o_ext;
        mem_hard[a_out] <= o_hard;
      end else begin
        mem_e1[a_out]   <= o_ext;
      end
    end
  end

  // pass / iteration sequencer
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      st         <= D_IDLE;
      pass2      <= 1'b0;
      first_iter <= 1'b1;
      k_reg      <= '0;
      in_idx     <= '0;
      out_idx    <= '0;
      fl_cnt     <= '0;
      iter_goal  <= '0;
      iter_cnt   <= '0;
      done       <= 1'b0;
      sd_start   <= 1'b0;
    end else begin
      done     <= 1'b0;
      sd_start <= 1'b0;
      if (o_valid) out_idx <= out_idx + 1'b1;
      unique case (st)
        D_IDLE: if (start) begin
          st         <= D_STEP;
          pass2      <= 1'b0;
          first_iter <= 1'b1;
          k_reg      <= cfg_n + AW'(NT);
          iter_goal  <= cfg_mode2 ? cfg_iter : 4'd1;
          iter_cnt   <= '0;
          in_idx     <= '0;
          out_idx    <= '0;
          sd_start   <= 1'b1;
        end
        D_STEP: if (!sd_start) begin
          in_idx <= in_idx + 1'b1;
          if (in_idx + 1'b1 == k_reg) begin
            st     <= D_FLUSH;
            fl_cnt <= '0;
          end
        end
        D_FLUSH: begin
          fl_cnt <= fl_cnt + 1'b1;
          if (int'(fl_cnt) == TP - 2) st <= D_DRAIN;
        end
        D_DRAIN: if (out_idx == k_reg) st <= D_NEXT;
        D_NEXT: begin
          in_idx   <= '0;
          out_idx  <= '0;
          sd_start <= 1'b1;
          if (!pass2) begin
            pass2 <= 1'b1;
            st    <= D_STEP;
          end else begin
            pass2      <= 1'b0;
            first_iter <= 1'b0;
            iter_cnt   <= iter_cnt + 1'b1;
            if (iter_cnt + 1'b1 >= iter_goal) begin
              st   <= D_IDLE;
              done <= 1'b1;
            end else begin
              st <= D_STEP;
            end
          end
        end
        default: st <= D_IDLE;
      endcase
    end

  // Every decision of a pass must have been written before the next pass.
  assert property (@(posedge clk) disable iff (!rst_n)
    (st == D_NEXT) |-> (out_idx == k_reg));
endmodule
