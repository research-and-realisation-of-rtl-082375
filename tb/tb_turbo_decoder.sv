// tb_turbo_decoder: loads MTBC blocks, encoded by the reference model and
// sent over a quantised BPSK channel, into the decoder memories over the host
// bus and decodes them. Checks: decisions equal the data in mode 2 for
// noise-free and noisy blocks and variable lengths; more iterations never
// leave more errors than one iteration on the same noisy block; mode 1 runs
// one iteration and uses the extrinsic values loaded by the host (strong
// correct a-priori values let it decode a block that is too noisy
// otherwise); host read-back of memories; iteration counter; and the cycle
// count of I iterations, I * 2 * (K + TP + 3) + 1 after start.
module tb_turbo_decoder;
  import mtbc_pkg::*;
  import mtbc_ref_pkg::*;
  localparam int N_MAX = 448, TP = 28, K_MAX = N_MAX + 3;
  localparam int AW = $clog2(K_MAX);

  logic clk = 0, rst_n = 0, host_we = 0, cfg_mode2 = 1, start = 0, busy, done;
  host_sel_t host_sel = SEL_SYS;
  logic [AW-1:0] host_addr = '0, cfg_n = '0;
  logic [15:0] host_wdata = '0, host_rdata;
  logic [3:0] cfg_iter = 4'd3, iter_cnt;
  int checks = 0, failures = 0, n_improved = 0, n_mode1 = 0, n_mode2 = 0;

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

  task automatic rd(host_sel_t sel, int addr, output int data);
    @(negedge clk);
    host_sel = sel; host_addr = AW'(addr);
    #1 data = int'(host_rdata);
  endtask

  bit d[];
  int k_cur;

  task automatic load(int n, real sigma);
    bit xs[], y1[], y2[];
    int perm[], n0, e1, e2, v, sq[];
    k_cur = n + 3;
    d = new[n];
    foreach (d[i]) d[i] = 1'($urandom);
    ref_make_perm(k_cur, perm);
    ref_encode(d, perm, xs, y1, y2, n0, e1, e2);
    sq = new[k_cur];
    for (int t = 0; t < k_cur; t++) begin
      wr(SEL_PERM, t, perm[t]);
      sq[t] = ref_channel(xs[t], 4.0, sigma);
      wr(SEL_SYS, t, sq[t]);
      wr(SEL_PAR1, t, (t % 2 == 0) ? ref_channel(y1[t], 4.0, sigma) : 0);
      wr(SEL_PAR2, t, (t % 2 == 1) ? ref_channel(y2[t], 4.0, sigma) : 0);
    end
    // read back a few entries
    for (int i = 0; i < 4; i++) begin
      int t = $urandom_range(k_cur - 1, 0);
      rd(SEL_SYS, t, v);  check(int'(signed'(4'(v))) == sq[t], "SYS read-back");
      rd(SEL_PERM, t, v); check(v == perm[t], "PERM read-back");
    end
    cfg_n = AW'(n);
  endtask

  task automatic decode(bit mode2, int iters, output int errors);
    int cyc, v;
    @(negedge clk); cfg_mode2 = mode2; cfg_iter = 4'(iters); start = 1;
    @(negedge clk); start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    if (mode2) begin
      n_mode2++;
      check(int'(iter_cnt) == iters, "iteration counter");
      check(cyc == iters * 2 * (k_cur + TP + 3) + 1,
            $sformatf("%0d cycles for %0d iterations, K=%0d", cyc, iters, k_cur));
    end else begin
      n_mode1++;
      check(int'(iter_cnt) == 1, "mode 1 iteration counter");
      check(cyc == 2 * (k_cur + TP + 3) + 1, $sformatf("mode 1: %0d cycles", cyc));
    end
    errors = 0;
    for (int t = 0; t < d.size(); t++) begin
      rd(SEL_HARD, t, v);
      if (v[0] != d[t]) errors++;
    end
  endtask

  initial begin
    int e, e1, e4;
    repeat (2) @(negedge clk);
    rst_n = 1;
    load(448, 0.0);  decode(1, 3, e); check(e == 0, $sformatf("noise-free: %0d errors", e));
    load(448, 2.2);  decode(1, 3, e); check(e == 0, $sformatf("sigma 2.2: %0d errors", e));
    load(200, 2.2);  decode(1, 2, e); check(e == 0, $sformatf("N=200: %0d errors", e));
    for (int b = 0; b < 3; b++) begin
      load(448, 3.0);
      decode(1, 1, e1);
      decode(1, 4, e4);
      $display("sigma 3.0: %0d errors after 1 iteration, %0d after 4", e1, e4);
      check(e4 <= e1, "more iterations left more errors");
      if (e4 < e1) n_improved++;
    end
    check(n_improved > 0, "iterations never improved a block");
    // mode 1 with host-supplied a-priori values on a very noisy block
    load(448, 4.0);
    for (int t = 0; t < k_cur; t++) wr(SEL_EXT, t, 0);
    decode(0, 1, e1);
    for (int t = 0; t < k_cur; t++) wr(SEL_EXT, t, (t < d.size()) ? (d[t] ? 7 : -8) : 0);
    decode(0, 1, e);
    $display("mode 1 at sigma 4.0: %0d errors without, %0d with a-priori values", e1, e);
    check(e == 0, "mode 1 ignored the loaded extrinsic values");
    check(e1 > 0, "block was not noisy enough to show the a-priori effect");
    check(n_mode1 > 0 && n_mode2 > 0, "both modes ran");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
