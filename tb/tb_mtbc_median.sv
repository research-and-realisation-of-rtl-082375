// tb_mtbc_median: the codec in the configuration of the 440-bit ATM-cell
// simulations: N = 440 (interleaver 443, 5 zero bits), code rate about 5/7,
// truncation path length 56, two iterations. The rate-5/7 puncturing
// pattern is an assumption of this testbench: period 5, the first half keeps
// position 0, the second half position 2 of each period, giving 443 + 178 =
// 621 transmitted bits (rate 0.709). The channel is BPSK with 4-bit
// quantisation (the multicarrier DQPSK system is not modelled). Checks the
// transmitted bit count, the encoder streams against the reference, the
// decoded data, and the run time 2 * 2 * (443 + 56 + 3) + 1 cycles.
module tb_mtbc_median;
  import mtbc_pkg::*;
  import mtbc_ref_pkg::*;

  localparam int N_MAX = 448, TP = 56, K_MAX = N_MAX + 3;
  localparam int AW = $clog2(K_MAX);
  localparam int N = 440, K = N + 3, ITERS = 2;
  localparam logic [4:0] PAT1 = 5'b00001, PAT2 = 5'b00100;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic            enc_start = 0, enc_busy, enc_done, d_valid = 0, d_bit = 0, d_ready;
  logic [AW-1:0]   enc_n = '0, dec_n = '0, host_addr = '0;
  logic            x_valid, x_bit, y_valid, y_bit, y_half;
  logic            host_we = 0;
  host_sel_t       host_sel = SEL_SYS;
  logic [15:0]     host_wdata = '0, host_rdata;
  logic [3:0]      dec_iter = 4'(ITERS), dec_iter_cnt;
  logic            dec_mode2 = 1'b1, dec_start = 1'b0, dec_busy, dec_done;

  mtbc_top #(.TP(TP), .PPER(5), .PAT1(PAT1), .PAT2(PAT2)) dut (.*);

  int checks = 0, failures = 0, n_corrected = 0;
  bit cap_x[$], cap_y1[$], cap_y2[$];

  always @(posedge clk) if (rst_n) begin
    if (x_valid) cap_x.push_back(x_bit);
    if (y_valid) begin
      if (y_half) cap_y2.push_back(y_bit); else cap_y1.push_back(y_bit);
    end
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  task automatic host_write(host_sel_t sel, int addr, int data);
    @(negedge clk);
    host_we = 1; host_sel = sel; host_addr = AW'(addr); host_wdata = 16'(data);
    @(negedge clk);
    host_we = 0;
  endtask

  task automatic run_block(real sigma);
    bit d[], xs[], y1[], y2[];
    int perm[], n0, e1, e2, raw, errs, cyc, i1, i2, rd;
    d = new[N];
    foreach (d[i]) d[i] = 1'($urandom);
    ref_make_perm(K, perm);
    ref_encode(d, perm, xs, y1, y2, n0, e1, e2);
    check(n0 == 5, "zero bits for N = 440");
    for (int q = 0; q < K; q++) host_write(SEL_PERM, q, perm[q]);
    cap_x.delete(); cap_y1.delete(); cap_y2.delete();
    @(negedge clk); enc_n = AW'(N); enc_start = 1;
    @(negedge clk); enc_start = 0;
    for (int i = 0; i < N; i++) begin
      d_valid = 1; d_bit = d[i];
      @(negedge clk);
    end
    d_valid = 0;
    while (!enc_done) @(negedge clk);
    @(negedge clk);
    check(cap_x.size() + cap_y1.size() + cap_y2.size() == 621,
          $sformatf("%0d transmitted bits", cap_x.size() + cap_y1.size() + cap_y2.size()));
    for (int t = 0; t < K && t < cap_x.size(); t++) check(cap_x[t] == xs[t], "X");
    i1 = 0; i2 = 0;
    raw = 0;
    for (int t = 0; t < K; t++) begin
      int v;
      v = ref_channel(xs[t], 4.0, sigma);
      if (t < N && ((v > 0) != d[t])) raw++;
      host_write(SEL_SYS, t, v);
      if (PAT1[t % 5]) begin
        check(i1 < cap_y1.size() && cap_y1[i1] == y1[t], "Y1");
        i1++;
        host_write(SEL_PAR1, t, ref_channel(y1[t], 4.0, sigma));
      end else host_write(SEL_PAR1, t, 0);
      if (PAT2[t % 5]) begin
        check(i2 < cap_y2.size() && cap_y2[i2] == y2[t], "Y2");
        i2++;
        host_write(SEL_PAR2, t, ref_channel(y2[t], 4.0, sigma));
      end else host_write(SEL_PAR2, t, 0);
    end
    @(negedge clk); dec_n = AW'(N); dec_start = 1;
    @(negedge clk); dec_start = 0;
    cyc = 1;
    while (!dec_done) begin @(negedge clk); cyc++; end
    check(cyc == ITERS * 2 * (K + TP + 3) + 1, $sformatf("%0d cycles", cyc));
    errs = 0;
    for (int t = 0; t < N; t++) begin
      @(negedge clk); host_sel = SEL_HARD; host_addr = AW'(t);
      #1 rd = int'(host_rdata);
      if (rd[0] != d[t]) errs++;
    end
    $display("N=%0d rate 440/621 TP=%0d sigma=%0.2f: channel errors %0d, decoded errors %0d",
             N, TP, sigma, raw, errs);
    check(errs == 0, "decoded errors");
    if (raw > 0 && errs == 0) n_corrected++;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    run_block(0.0);
    run_block(1.8);
    run_block(1.8);
    check(n_corrected > 0, "no channel error was corrected");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
