// tb_mtbc_encoder: encodes random blocks of several lengths (including the
// 440-bit and 448-bit sizes and lengths with N0 = 0) with source stalls, and
// compares the systematic stream X and the punctured parity streams of both
// halves with the reference MTBC encoder. Also checks that both halves end in
// state 0 and that the block takes N + stalls + 3 + N0 + 1 + K busy cycles.
module tb_mtbc_encoder;
  import mtbc_pkg::*;
  import mtbc_ref_pkg::*;
  localparam int N_MAX = 448;
  localparam int K_MAX = N_MAX + 3;
  localparam int AW = $clog2(K_MAX);

  logic clk = 0, rst_n = 0, start = 0, busy, done, d_valid = 0, d_bit = 0, d_ready;
  logic perm_we = 0, x_valid, x_bit, y_valid, y_bit, y_half;
  logic [AW-1:0] n_len = '0, perm_addr = '0, perm_data = '0;
  rsc_state_t rsc_state;
  int checks = 0, failures = 0, busy_cycles = 0, n_zero_blocks = 0;
  bit cap_x[$], cap_y1[$], cap_y2[$];

  always #5 clk = ~clk;
  mtbc_encoder dut (.*);

  always @(posedge clk) if (rst_n) begin
    if (busy) busy_cycles++;
    if (x_valid) cap_x.push_back(x_bit);
    if (y_valid) begin
      if (y_half) cap_y2.push_back(y_bit); else cap_y1.push_back(y_bit);
    end
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic run(int n);
    bit d[], xs[], y1[], y2[];
    int perm[], n0, e1, e2, k, stalls;
    k = n + 3;
    d = new[n];
    foreach (d[i]) d[i] = 1'($urandom);
    ref_make_perm(k, perm);
    ref_encode(d, perm, xs, y1, y2, n0, e1, e2);
    for (int q = 0; q < k; q++) begin
      @(negedge clk); perm_we = 1; perm_addr = AW'(q); perm_data = AW'(perm[q]);
    end
    @(negedge clk); perm_we = 0;
    cap_x.delete(); cap_y1.delete(); cap_y2.delete();
    busy_cycles = 0; stalls = 0;
    n_len = AW'(n); start = 1;
    @(negedge clk); start = 0;
    for (int i = 0; i < n; i++) begin
      if ($urandom_range(4, 0) == 0) begin
        d_valid = 0; stalls++; @(negedge clk);
      end
      d_valid = 1; d_bit = d[i];
      @(negedge clk);
    end
    d_valid = 0;
    while (!done) begin
      @(negedge clk);
    end
    check(rsc_state == '0, "second half not terminated");
    @(negedge clk);
    check(busy_cycles == n + stalls + 3 + n0 + 1 + k,
          $sformatf("N=%0d busy %0d cycles, expected %0d", n, busy_cycles, n + stalls + 3 + n0 + 1 + k));
    check(cap_x.size() == k, "X count");
    for (int t = 0; t < k && t < cap_x.size(); t++) check(cap_x[t] == xs[t], $sformatf("X[%0d]", t));
    check(cap_y1.size() == (k + 1) / 2, "Y1 count");
    check(cap_y2.size() == k / 2, "Y2 count");
    for (int t = 0; t < cap_y1.size(); t++) check(cap_y1[t] == y1[2*t], $sformatf("Y1[%0d]", t));
    for (int t = 0; t < cap_y2.size(); t++) check(cap_y2[t] == y2[2*t+1], $sformatf("Y2[%0d]", t));
    if (n0 == 0) n_zero_blocks++;
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(440); run(448); run(32); run(53); run(4);
    for (int i = 0; i < 4; i++) run($urandom_range(200, 28));
    check(n_zero_blocks > 0, "no block without zero insertion");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
