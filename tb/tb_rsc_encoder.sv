// tb_rsc_encoder: drives random input bits (with idle cycles and a clear in
// the middle) and compares parity and state with a reference RSC {13,15}
// model; also checks that the tail sequence returns the encoder to state 0
// and that 1 + D^7 is a zero-returning input (reset polynomial).
module tb_rsc_encoder;
  import mtbc_pkg::*;
  import mtbc_ref_pkg::*;
  logic clk = 0, rst_n = 0, clr = 0, en = 0, u = 0, par;
  rsc_state_t state;
  int checks = 0, failures = 0;
  ref_rsc_t r = '{0, 0, 0};

  always #5 clk = ~clk;
  rsc_encoder dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic apply(bit bit_in, bit enable);
    bit p, a;
    @(negedge clk);
    en = enable; u = bit_in;
    #1;
    if (enable) begin
      a = ref_step(r, bit_in, p);
      check(par == p, "parity");
    end
    @(posedge clk); #1;
    check(state == {r.r3, r.r2, r.r1}, "state");
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 300; i++) begin
      if (i == 150) begin
        @(negedge clk); clr = 1; en = 0; @(negedge clk); clr = 0;
        r = '{0, 0, 0};
        check(state == '0, "clear");
      end
      apply(1'($urandom), ($urandom_range(4, 0) != 0));
    end
    for (int i = 0; i < 3; i++) apply(r.r2 ^ r.r3, 1'b1);
    check(state == '0, "tail termination");
    // 1 + D^7 from the zero state returns to zero
    apply(1'b1, 1'b1);
    for (int i = 0; i < 6; i++) apply(1'b0, 1'b1);
    check(state != '0, "single one leaves zero state");
    apply(1'b1, 1'b1);
    check(state == '0, "reset polynomial 1 + D^7");
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
