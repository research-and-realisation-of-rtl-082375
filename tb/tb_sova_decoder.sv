// tb_sova_decoder: encodes random terminated blocks (data plus tail bits of
// the first MTBC half) with the reference encoder, passes them through a BPSK
// channel with 4-bit quantisation and decodes them with one SOVA pass.
// Checks: one output per position, in order; the TP - 1 cycle latency; the
// decisions equal the data (noise-free and moderately noisy blocks, with and
// without a-priori values); the soft output's sign equals the decision; and
// (also on weak-signal blocks, where decisions may be wrong and soft values
// stay small)
// the extrinsic output equals the saturated difference between the soft
// output and the intrinsic value ys + la of the same position.
module tb_sova_decoder;
  import mtbc_pkg::*;
  import mtbc_ref_pkg::*;
  localparam int TP = 28;
  logic clk = 0, rst_n = 0, start = 0, step = 0, flush = 0;
  soft_t ys = '0, la = '0, yp = '0;
  logic out_valid, out_hard;
  metric_t out_llr;
  soft_t out_ext;
  int checks = 0, failures = 0, cycle = 0;
  int intr_q[$];
  bit exp_q[$], dec_check_q[$];
  int n_out, first_out, step0_cycle, n_corrected = 0, n_sat = 0;

  always #5 clk = ~clk;
  sova_decoder #(.TP(TP)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  always @(posedge clk) begin
    cycle++;
    #1;
    if (out_valid) begin
      int intr, e;
      bit eb, cd;
      if (first_out < 0) first_out = cycle;
      n_out++;
      intr = intr_q.pop_front();
      eb = exp_q.pop_front();
      cd = dec_check_q.pop_front();
      e = int'(out_llr) - intr;
      if (e > 7) begin e = 7; n_sat++; end
      if (e < -8) begin e = -8; n_sat++; end
      if (cd) check(out_hard == eb, $sformatf("decision %0d", n_out - 1));
      check(out_hard ? (out_llr >= 0) : (out_llr <= 0), "soft output sign");
      check(int'(out_ext) == e, $sformatf("extrinsic %0d exp %0d", out_ext, e));
    end
  end

  task automatic block(int n, real sigma, bit use_apriori, real amp = 4.0, bit check_dec = 1);
    bit d[], xs[], y1[], y2[];
    int perm[], n0, e1, e2, k, raw;
    k = n + 3;
    d = new[n];
    foreach (d[i]) d[i] = 1'($urandom);
    perm = new[k];
    foreach (perm[i]) perm[i] = i;
    ref_encode(d, perm, xs, y1, y2, n0, e1, e2);
    intr_q.delete(); exp_q.delete(); dec_check_q.delete();
    n_out = 0; first_out = -1; raw = 0;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    for (int t = 0; t < k; t++) begin
      @(negedge clk);
      if (t == 0) step0_cycle = cycle + 1;
      step = 1;
      ys = soft_t'(ref_channel(xs[t], amp, sigma));
      yp = soft_t'(ref_channel(y1[t], amp, sigma));
      la = use_apriori ? soft_t'($urandom_range(2, 0) * (xs[t] ? 1 : -1)) : '0;
      if ((ys > 0) != xs[t]) raw++;
      intr_q.push_back(int'(ys) + int'(la));
      exp_q.push_back(xs[t]);
      dec_check_q.push_back(check_dec);
    end
    for (int f = 0; f < TP - 1; f++) begin
      @(negedge clk); step = 0; flush = 1;
    end
    @(negedge clk); flush = 0;
    repeat (3) @(negedge clk);
    check(n_out == k, $sformatf("%0d outputs for %0d positions", n_out, k));
    check(first_out - step0_cycle == TP - 1, $sformatf("latency %0d", first_out - step0_cycle));
    if (raw > 0) n_corrected++;
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    block(448, 0.0, 0);
    block(448, 1.5, 0);
    block(440, 1.5, 1);
    block(60, 0.0, 1);
    // weak signal: soft outputs stay below saturation, decisions not checked
    block(448, 1.2, 0, 1.5, 0);
    block(448, 1.2, 1, 1.5, 0);
    check(n_corrected > 0, "no channel error was corrected");
    check(n_sat > 0, "extrinsic saturation never happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
