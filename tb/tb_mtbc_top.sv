// tb_mtbc_top: end-to-end test of the MTBC codec at its default size
// (448-bit blocks, truncation length 28). The testbench plays the part of the
// host PC: it loads a residue-preserving interleaver table, encodes random
// blocks with the RTL encoder and checks X/Y against an independent reference
// encoder, sends them over a BPSK channel with 4-bit quantisation, loads the
// depunctured soft values into the decoder and runs it in mode 2 (I
// iterations) and mode 1 (one iteration with host-supplied extrinsic
// values). Decoded bits are compared with the transmitted data; the number
// of clock cycles per decoding run is checked against the pass schedule.
// Mechanisms counted: tail bits, zero insertion, punctured bits, both modes,
// corrected channel errors, saturated extrinsic values, variable block length.
module tb_mtbc_top;
  import mtbc_pkg::*;
  import mtbc_ref_pkg::*;

  localparam int N_MAX = 448;
  localparam int TP    = 28;
  localparam int K_MAX = N_MAX + 3;
  localparam int AW    = $clog2(K_MAX);

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic            enc_start = 0, enc_busy, enc_done, d_valid = 0, d_bit = 0, d_ready;
  logic [AW-1:0]   enc_n = '0, dec_n = '0, host_addr = '0;
  logic            x_valid, x_bit, y_valid, y_bit, y_half;
  logic            host_we = 0;
  host_sel_t       host_sel = SEL_SYS;
  logic [15:0]     host_wdata = '0, host_rdata;
  logic [3:0]      dec_iter = 4'd3, dec_iter_cnt;
  logic            dec_mode2 = 1'b1, dec_start = 1'b0, dec_busy, dec_done;

  mtbc_top dut (.*);

  int checks = 0, failures = 0;
  int n_tail = 0, n_zero = 0, n_punct = 0, n_mode1 = 0, n_mode2 = 0;
  int n_corrected = 0, n_sat = 0, n_lengths = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic host_write(host_sel_t sel, int addr, int data);
    @(negedge clk);
    host_we = 1; host_sel = sel; host_addr = AW'(addr); host_wdata = 16'(data);
    @(negedge clk);
    host_we = 0;
  endtask

  task automatic host_read(host_sel_t sel, int addr, output int data);
    @(negedge clk);
    host_sel = sel; host_addr = AW'(addr);
    #1 data = int'(host_rdata);
  endtask

  // stream captured from the encoder
  bit cap_x[$], cap_y1[$], cap_y2[$];
  always @(posedge clk) if (rst_n) begin
    if (x_valid) cap_x.push_back(x_bit);
    if (y_valid) begin
      if (y_half) cap_y2.push_back(y_bit); else cap_y1.push_back(y_bit);
    end
  end

  // encoder cycle accounting for tail / zero insertion
  int enc_cycles;
  always @(posedge clk) if (enc_busy) enc_cycles++;

  task automatic run_block(int n, real sigma, int iters);
    bit d[], xs[], y1[], y2[];
    int perm[], n0, e1, e2, k, rd, raw_err, dec_err, cyc, sys_q[];
    k = n + 3;
    d = new[n];
    foreach (d[i]) d[i] = 1'($urandom);
    ref_make_perm(k, perm);
    ref_encode(d, perm, xs, y1, y2, n0, e1, e2);
    check(e1 == 0 && e2 == 0, "reference frame not terminated");

    for (int q = 0; q < k; q++) host_write(SEL_PERM, q, perm[q]);

    // ---- encode ----
    cap_x.delete(); cap_y1.delete(); cap_y2.delete();
    enc_cycles = 0;
    @(negedge clk); enc_n = AW'(n); enc_start = 1;
    @(negedge clk); enc_start = 0;
    for (int i = 0; i < n; i++) begin
      d_valid = 1; d_bit = d[i];
      if ($urandom_range(3, 0) == 0) begin      // occasional source stall
        d_valid = 0; @(negedge clk); d_valid = 1;
      end
      while (!d_ready) @(negedge clk);
      @(negedge clk);
    end
    d_valid = 0;
    while (!enc_done) @(negedge clk);
    @(negedge clk);

    check(cap_x.size() == k, $sformatf("X count %0d != %0d", cap_x.size(), k));
    for (int t = 0; t < k && t < cap_x.size(); t++) check(cap_x[t] == xs[t], $sformatf("X[%0d]", t));
    check(cap_y1.size() == (k + 1) / 2, "Y1 count");
    check(cap_y2.size() == k / 2, "Y2 count");
    for (int t = 0; t < cap_y1.size(); t++) check(cap_y1[t] == y1[2*t], $sformatf("Y1[%0d]", t));
    for (int t = 0; t < cap_y2.size(); t++) check(cap_y2[t] == y2[2*t+1], $sformatf("Y2[%0d]", t));
    n_tail  += 3;
    n_zero  += n0;
    n_punct += 2 * k - cap_y1.size() - cap_y2.size();
    n_lengths++;

    // ---- channel and load ----
    raw_err = 0;
    sys_q = new[k];
    for (int t = 0; t < k; t++) begin
      sys_q[t] = ref_channel(xs[t], 4.0, sigma);
      if (t < n && ((sys_q[t] > 0) != d[t])) raw_err++;
      host_write(SEL_SYS, t, sys_q[t]);
      host_write(SEL_PAR1, t, (t % 2 == 0) ? ref_channel(y1[t], 4.0, sigma) : 0);
      host_write(SEL_PAR2, t, (t % 2 == 1) ? ref_channel(y2[t], 4.0, sigma) : 0);
    end

    // ---- mode 2 ----
    @(negedge clk); dec_n = AW'(n); dec_mode2 = 1; dec_iter = 4'(iters); dec_start = 1;
    @(negedge clk); dec_start = 0;
    cyc = 1;
    while (!dec_done) begin @(negedge clk); cyc++; end
    n_mode2++;
    check(dec_iter_cnt == 4'(iters), "iteration count");
    check(cyc >= iters * 2 * (k + TP) && cyc <= iters * 2 * (k + TP + 4),
          $sformatf("mode 2 took %0d cycles for %0d iterations, K=%0d", cyc, iters, k));
    dec_err = 0;
    for (int t = 0; t < n; t++) begin
      host_read(SEL_HARD, t, rd);
      if (rd[0] != d[t]) dec_err++;
    end
    $display("block N=%0d sigma=%0.2f iters=%0d: channel errors %0d, decoded errors %0d, %0d cycles",
             n, sigma, iters, raw_err, dec_err, cyc);
    check(dec_err == 0, $sformatf("decoded errors %0d", dec_err));
    if (raw_err > 0 && dec_err == 0) n_corrected++;

    // ---- mode 1: one iteration from zero extrinsic values ----
    for (int t = 0; t < k; t++) host_write(SEL_EXT, t, 0);
    @(negedge clk); dec_mode2 = 0; dec_start = 1;
    @(negedge clk); dec_start = 0;
    cyc = 1;
    while (!dec_done) begin @(negedge clk); cyc++; end
    n_mode1++;
    check(dec_iter_cnt == 4'd1, "mode 1 runs one iteration");
    check(cyc <= 2 * (k + TP + 4), "mode 1 cycle count");
    for (int t = 0; t < k; t++) begin
      int h;
      host_read(SEL_EXT, t, rd);
      host_read(SEL_HARD, t, h);
      rd = int'(signed'(4'(rd)));
      if (rd == 7 || rd == -8) n_sat++;
      // a confident extrinsic value must agree with the decision
      if (rd >= 4 || rd <= -4) check((rd > 0) == h[0], $sformatf("extrinsic sign at %0d", t));
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    run_block(448, 0.0, 3);     // noise-free, full block length
    run_block(448, 2.2, 3);     // noisy channel
    run_block(440, 2.2, 1);     // the 440-bit example length, one iteration
    run_block(440, 2.2, 3);
    run_block(100, 0.0, 2);     // short block
    check(n_tail > 0,      "tail bits never inserted");
    check(n_zero > 0,      "zero insertion never happened");
    check(n_punct > 0,     "puncturing never happened");
    check(n_mode1 > 0,     "mode 1 never ran");
    check(n_mode2 > 0,     "mode 2 never ran");
    check(n_corrected > 0, "no channel error was corrected");
    check(n_sat > 0,       "extrinsic saturation never happened");
    check(n_lengths > 1,   "only one block length");
    $display("mechanisms: tail=%0d zero=%0d punct=%0d mode1=%0d mode2=%0d corrected=%0d sat=%0d",
             n_tail, n_zero, n_punct, n_mode1, n_mode2, n_corrected, n_sat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
