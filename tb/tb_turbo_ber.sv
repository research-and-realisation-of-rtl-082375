// tb_turbo_ber: bit error rate of the turbo decoder at its default size
// (N = 448, rate 1/2, TP = 28, 4-bit inputs) over a quantised BPSK/AWGN
// channel, for several Eb/N0 values and 1, 2 and 3 iterations. Blocks are
// encoded by the reference model with a fresh random interleaver each, loaded
// over the host bus and decoded in mode 2 three times (I = 1, 2, 3) from the
// same received values. The amplitude is 4 quantisation steps; with rate 1/2,
// Eb/N0 = 4^2 / sigma^2. The table printed at the end gives the raw error
// rate of the systematic bits and the decoded error rate per iteration count.
// Checks (loose, because the default run is short): from 2 dB upwards three
// iterations leave fewer errors than one and the decoded rate is below the
// raw rate; at the highest point it is below a tenth of the raw rate.
// +BLOCKS=n sets the blocks per point (default 12) for longer measurements.
module tb_turbo_ber;
  import mtbc_pkg::*;
  import mtbc_ref_pkg::*;
  localparam int N_MAX = 448, TP = 28, K_MAX = N_MAX + 3;
  localparam int AW = $clog2(K_MAX);
  localparam int N = N_MAX, K = N + 3;
  localparam int NPTS = 5;
  localparam real EBN0 [NPTS] = '{1.0, 1.5, 2.0, 2.5, 3.0};
  localparam real AMP = 4.0;

  logic clk = 0, rst_n = 0, host_we = 0, cfg_mode2 = 1, start = 0, busy, done;
  host_sel_t host_sel = SEL_SYS;
  logic [AW-1:0] host_addr = '0, cfg_n = AW'(N);
  logic [15:0] host_wdata = '0, host_rdata;
  logic [3:0] cfg_iter = 4'd1, iter_cnt;
  int checks = 0, failures = 0, blocks = 12;

  always #5 clk = ~clk;
  turbo_decoder #(.N_MAX(N_MAX), .TP(TP)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  task automatic wr(host_sel_t sel, int addr, int data);
    @(negedge clk);
    host_we = 1; host_sel = sel; host_addr = AW'(addr); host_wdata = 16'(data);
    @(negedge clk);
    host_we = 0;
  endtask

  // Decodes the loaded block with the given iteration count; returns the
  // number of wrong decisions against d.
  task automatic decode(int iters, input bit d[], output int errors);
    int v;
    @(negedge clk); cfg_iter = 4'(iters); start = 1;
    @(negedge clk); start = 0;
    while (!done) @(negedge clk);
    errors = 0;
    for (int t = 0; t < N; t++) begin
      @(negedge clk); host_sel = SEL_HARD; host_addr = AW'(t);
      #1 v = int'(host_rdata);
      if (v[0] != d[t]) errors++;
    end
  endtask

  initial begin
    longint raw [NPTS], dec [NPTS][3];
    real sigma;
    void'($value$plusargs("BLOCKS=%d", blocks));
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int p = 0; p < NPTS; p++) begin
      raw[p] = 0;
      for (int i = 0; i < 3; i++) dec[p][i] = 0;
      sigma = AMP / $sqrt(10.0 ** (EBN0[p] / 10.0));
      for (int b = 0; b < blocks; b++) begin
        bit d[], xs[], y1[], y2[];
        int perm[], n0, e1, e2, v, errs;
        d = new[N];
        foreach (d[i]) d[i] = 1'($urandom);
        ref_make_perm(K, perm);
        ref_encode(d, perm, xs, y1, y2, n0, e1, e2);
        for (int t = 0; t < K; t++) begin
          wr(SEL_PERM, t, perm[t]);
          v = ref_channel(xs[t], AMP, sigma);
          if (t < N && ((v > 0) != d[t])) raw[p]++;
          wr(SEL_SYS, t, v);
          wr(SEL_PAR1, t, (t % 2 == 0) ? ref_channel(y1[t], AMP, sigma) : 0);
          wr(SEL_PAR2, t, (t % 2 == 1) ? ref_channel(y2[t], AMP, sigma) : 0);
        end
        for (int i = 1; i <= 3; i++) begin
          decode(i, d, errs);
          dec[p][i-1] += longint'(errs);
        end
      end
    end

    $display("Eb/N0 dB  bits     raw BER    I=1        I=2        I=3");
    for (int p = 0; p < NPTS; p++) begin
      real nb;
      nb = real'(blocks * N);
      $display("%5.1f    %7d  %9.2e  %9.2e  %9.2e  %9.2e", EBN0[p], blocks * N,
               real'(raw[p]) / nb, real'(dec[p][0]) / nb, real'(dec[p][1]) / nb,
               real'(dec[p][2]) / nb);
      if (EBN0[p] >= 2.0) begin
        check(dec[p][2] < dec[p][0],
              $sformatf("%0.1f dB: %0d errors after 3 iterations, %0d after 1",
                        EBN0[p], dec[p][2], dec[p][0]));
        check(dec[p][2] < raw[p], $sformatf("%0.1f dB: no coding gain", EBN0[p]));
      end
    end
    check(10 * dec[NPTS-1][2] < raw[NPTS-1], "error rate at the highest point");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int limit;
    limit = 12;
    void'($value$plusargs("BLOCKS=%d", limit));
    repeat (NPTS * limit * 20000 + 10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
