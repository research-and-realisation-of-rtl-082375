// perm_ram: interleaver read-address table. Entry q holds the input position
// that is read out at output position q. The table is written word by word
// from the host (the document's test system loads different random
// interleavers found by its systematic search) and has two asynchronous read
// ports, so one block step can look up the address of the bit entering a
// decoder and of the bit leaving it. A register array (distributed RAM) is
// this design's choice. Contents are undefined until the host loads them.
module perm_ram #(
  parameter int DEPTH = 451,
  parameter int AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [AW-1:0] wdata,
  input  logic [AW-1:0] raddr_a,
  output logic [AW-1:0] rdata_a,
  input  logic [AW-1:0] raddr_b,
  output logic [AW-1:0] rdata_b
);
  logic [AW-1:0] mem [DEPTH];

  always_ff @(posedge clk)
    if (we && int'(waddr) < DEPTH) mem[waddr] <= wdata;

  always_comb begin
    rdata_a = (int'(raddr_a) < DEPTH) ? mem[raddr_a] : '0;
    rdata_b = (int'(raddr_b) < DEPTH) ? mem[raddr_b] : '0;
  end
endmodule
