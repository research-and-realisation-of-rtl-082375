// puncturer: removes redundancy bits from the encoder output with a periodic
// pattern, one pattern for the parity of the first (natural order) half and
// one for the parity of the interleaved half. Bit j of a pattern says whether
// the j-th parity bit of a period is transmitted. The phase counter restarts
// with `restart`, which the encoder pulses at the start of each half.
//
// The document states that the redundancy is punctured to reach the wanted
// code rate (eq. 3.3) but gives no pattern. The defaults (period 2, first
// half keeps even positions, second half odd positions) give the rate-1/2
// code used in the hardware measurements; other patterns are parameters.
//
// Interface: in_valid/in_half/in_par in, out_valid/out_par in the same cycle.
module puncturer #(
  parameter int              PERIOD = 2,
  parameter logic [PERIOD-1:0] PAT1 = 2'b01,
  parameter logic [PERIOD-1:0] PAT2 = 2'b10
) (
  input  logic clk,
  input  logic rst_n,
  input  logic restart,
  input  logic in_valid,
  input  logic in_half,      // 0: first half, 1: interleaved half
  input  logic in_par,
  output logic out_valid,
  output logic out_par
);
  localparam int PW = (PERIOD > 1) ? $clog2(PERIOD) : 1;
  logic [PW-1:0] phase;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)                phase <= '0;
    else if (restart)          phase <= '0;
    else if (in_valid)         phase <= (int'(phase) == PERIOD-1) ? '0 : phase + 1'b1;

  always_comb begin
    out_par   = in_par;
    out_valid = in_valid && (in_half ? PAT2[phase] : PAT1[phase]);
  end
endmodule
