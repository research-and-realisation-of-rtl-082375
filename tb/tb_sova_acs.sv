// tb_sova_acs: random path metrics (including ones at the clipping floor) and
// soft inputs; the expected survivors, decisions, decoded bits, metric
// differences, normalised and clipped metrics and best state are computed
// here by enumerating every (state, input) transition of the reference RSC.
module tb_sova_acs;
  import mtbc_pkg::*;
  import mtbc_ref_pkg::*;
  metric_t pm [8], pm_new [8];
  logic signed [W_IN+1:0] bm [4];
  logic signed [W_IN:0] intrinsic;
  soft_t ys, la, yp;
  logic [7:0] dec, ubit;
  rel_t delta [8];
  rsc_state_t best;
  int checks = 0, failures = 0, n_clip = 0, n_dclip = 0;

  sova_bmu bmu (.ys(ys), .la(la), .yp(yp), .bm(bm), .intrinsic(intrinsic));
  sova_acs dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  initial begin
    for (int it = 0; it < 3000; it++) begin
      int cand [8][2];       // [new state][oldest bit of predecessor]
      int cu   [8][2];
      int sel [8], mx, ebest, v;
      ys = soft_t'($urandom); la = soft_t'($urandom); yp = soft_t'($urandom);
      for (int s = 0; s < 8; s++)
        pm[s] = ($urandom_range(5, 0) == 0) ? metric_t'(-64) : metric_t'(-$urandom_range(64, 0));
      if (it % 2 == 0) pm[$urandom_range(7, 0)] = '0;
      #1;
      for (int o = 0; o < 8; o++)
        for (int u = 0; u < 2; u++) begin
          ref_rsc_t r;
          bit p, a;
          int nn;
          r.r1 = o[0]; r.r2 = o[1]; r.r3 = o[2];
          a = ref_step(r, 1'(u), p);
          nn = {r.r3, r.r2, r.r1};
          cand[nn][o[2]] = int'(pm[o]) + u * (int'(ys) + int'(la)) + int'(p) * int'(yp);
          cu[nn][o[2]] = u;
        end
      mx = -1000; ebest = 0;
      for (int n = 0; n < 8; n++) begin
        int x, d;
        x = (cand[n][1] > cand[n][0]) ? 1 : 0;
        sel[n] = cand[n][x];
        d = cand[n][x] - cand[n][1-x];
        if (d > 63) begin d = 63; n_dclip++; end
        check(dec[n] == 1'(x), $sformatf("dec[%0d]", n));
        check(ubit[n] == 1'(cu[n][x]), $sformatf("ubit[%0d]", n));
        check(int'(delta[n]) == d, $sformatf("delta[%0d] %0d exp %0d", n, delta[n], d));
        if (sel[n] > mx) begin mx = sel[n]; ebest = n; end
      end
      check(int'(best) == ebest, "best state");
      for (int n = 0; n < 8; n++) begin
        v = sel[n] - mx;
        if (v < -64) begin v = -64; n_clip++; end
        check(int'(pm_new[n]) == v, $sformatf("pm_new[%0d] %0d exp %0d", n, pm_new[n], v));
      end
    end
    check(n_clip > 0, "metric clipping never exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
