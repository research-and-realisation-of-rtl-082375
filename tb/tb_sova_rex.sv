// tb_sova_rex: feeds random decisions, decoded bits, metric differences and
// best states for several hundred trellis steps followed by a flush, and
// compares every output with a reference register-exchange model kept here
// (survivor takeover, Hagenauer minimum update on the newest TP/2
// positions only, output of the oldest entry, flush from state 0). Also
// checks the TP-step output latency, the output count and that an update
// beyond the soft-update depth is not applied.
module tb_sova_rex;
  import mtbc_pkg::*;
  localparam int TP = 28, SD = 14;
  logic clk = 0, rst_n = 0, clr = 0, step = 0, flush = 0;
  logic [7:0] dec = '0, ubit = '0;
  rel_t delta [8];
  rsc_state_t best = '0;
  logic out_valid, out_hard;
  rel_t out_rel;
  int checks = 0, failures = 0;
  bit   h_ref [8][TP];
  int   r_ref [8][TP];
  bit   exp_h[$];
  int   exp_r[$];
  int   n_out = 0, first_out_cycle = -1, cycle = 0, n_deep_skip = 0;

  always #5 clk = ~clk;
  sova_rex #(.TP(TP), .SOFT_DEPTH(SD)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  always @(posedge clk) begin
    cycle++;
    #1;
    if (out_valid) begin
      if (first_out_cycle < 0) first_out_cycle = cycle;
      n_out++;
      if (exp_h.size() == 0) check(0, "unexpected output");
      else begin
        bit eh; int er;
        eh = exp_h.pop_front(); er = exp_r.pop_front();
        check(out_hard == eh && int'(out_rel) == er,
              $sformatf("output %0d: %b/%0d expected %b/%0d", n_out, out_hard, out_rel, eh, er));
      end
    end
  end

  task automatic do_step(int idx);
    bit nh [8][TP];
    int nr [8][TP];
    @(negedge clk);
    step = 1;
    best = rsc_state_t'($urandom);
    for (int n = 0; n < 8; n++) begin
      int p, c;
      dec[n] = 1'($urandom); ubit[n] = 1'($urandom);
      delta[n] = rel_t'($urandom_range(63, 0));
      p = {dec[n], 2'(n >> 1)};
      c = {~dec[n], 2'(n >> 1)};
      nh[n][0] = ubit[n]; nr[n][0] = int'(delta[n]);
      for (int j = 1; j < TP; j++) begin
        nh[n][j] = h_ref[p][j-1];
        nr[n][j] = r_ref[p][j-1];
        if (h_ref[p][j-1] != h_ref[c][j-1] && int'(delta[n]) < r_ref[p][j-1]) begin
          if (j - 1 < SD) nr[n][j] = int'(delta[n]);
          else n_deep_skip++;
        end
      end
    end
    h_ref = nh; r_ref = nr;
    if (idx >= TP - 1) begin
      exp_h.push_back(h_ref[best][TP-1]);
      exp_r.push_back(r_ref[best][TP-1]);
    end
  endtask

  task automatic do_flush();
    @(negedge clk);
    step = 0; flush = 1;
    exp_h.push_back(h_ref[0][TP-2]);
    exp_r.push_back(r_ref[0][TP-2]);
    for (int n = 0; n < 8; n++)
      for (int j = TP - 1; j > 0; j--) begin
        h_ref[n][j] = h_ref[n][j-1];
        r_ref[n][j] = r_ref[n][j-1];
      end
  endtask

  task automatic block(int k);
    int c0;
    @(negedge clk); clr = 1; @(negedge clk); clr = 0;
    c0 = cycle; first_out_cycle = -1; n_out = 0;
    for (int i = 0; i < k; i++) do_step(i);
    for (int f = 0; f < TP - 1; f++) do_flush();
    @(negedge clk); flush = 0;
    repeat (3) @(negedge clk);
    check(n_out == k, $sformatf("%0d outputs for %0d steps", n_out, k));
    // step 0 is taken at clock c0 + 2; its decision is output TP - 1 clocks later
    check(first_out_cycle - (c0 + 2) == TP - 1, $sformatf("latency %0d", first_out_cycle - (c0 + 2)));
    check(exp_h.size() == 0, "missing outputs");
  endtask

  initial begin
    for (int n = 0; n < 8; n++) begin
      delta[n] = '0;
      for (int j = 0; j < TP; j++) begin h_ref[n][j] = 0; r_ref[n][j] = 0; end
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    block(300);
    block(40);
    check(n_deep_skip > 0, "depth limit of the soft update never exercised");
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
