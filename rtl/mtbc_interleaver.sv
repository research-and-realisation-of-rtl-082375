// mtbc_interleaver: the interleaver of the MTBC encoder. It stores the
// K = N + NT data and tail bits in input order (write port, one bit per clock)
// and delivers them in permuted order: output position q returns the stored
// bit at position perm[q], where perm is a host-loaded table (perm_ram).
//
// The document asks that every bit leave the interleaver a multiple of the
// reset length l = 7 positions after it entered (counted in the stream that
// the single RSC encoder sees), which is what lets the second half of the
// code end in the zero state. With the zero padding of the encoder this holds
// when perm[q] mod 7 == q mod 7, i.e. when reading is shuffled only within the
// columns of a matrix of 7 columns. The table contents are the host's
// responsibility; the RTL does not check them. Size K_MAX follows the largest
// block length used in the document (448 data bits plus 3 tail bits).
//
// Timing: writes take effect at the clock edge; the read is combinational.
module mtbc_interleaver #(
  parameter int K_MAX = 451,
  parameter int AW    = $clog2(K_MAX)
) (
  input  logic          clk,
  // bit buffer, written in input order
  input  logic          wr_en,
  input  logic [AW-1:0] wr_addr,
  input  logic          wr_bit,
  // permutation table load
  input  logic          perm_we,
  input  logic [AW-1:0] perm_addr,
  input  logic [AW-1:0] perm_data,
  // permuted read
  input  logic [AW-1:0] rd_idx,
  output logic          rd_bit,
  output logic [AW-1:0] rd_src       // input position being read
);
  logic buffer [K_MAX];
  logic [AW-1:0] unused_b;

  perm_ram #(.DEPTH(K_MAX), .AW(AW)) u_perm (
    .clk(clk), .we(perm_we), .waddr(perm_addr), .wdata(perm_data),
    .raddr_a(rd_idx), .rdata_a(rd_src),
    .raddr_b('0), .rdata_b(unused_b)
  );

  always_ff @(posedge clk)
    if (wr_en && int'(wr_addr) < K_MAX) buffer[wr_addr] <= wr_bit;

  always_comb rd_bit = (int'(rd_src) < K_MAX) ? buffer[rd_src] : 1'b0;
endmodule
