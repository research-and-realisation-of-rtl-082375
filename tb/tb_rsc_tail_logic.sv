// tb_rsc_tail_logic: for every encoder state, applies the tail bit three times
// through a reference RSC model and checks that each tail bit makes the
// register input zero and that the encoder reaches state 0.
module tb_rsc_tail_logic;
  import mtbc_pkg::*;
  import mtbc_ref_pkg::*;
  rsc_state_t state;
  logic tail_bit;
  int checks = 0, failures = 0;

  rsc_tail_logic dut (.state(state), .tail_bit(tail_bit));

  initial begin
    for (int s0 = 0; s0 < 8; s0++) begin
      ref_rsc_t r;
      bit p, a;
      r.r1 = s0[0]; r.r2 = s0[1]; r.r3 = s0[2];
      for (int i = 0; i < 3; i++) begin
        state = {r.r3, r.r2, r.r1};
        #1;
        checks++;
        if (tail_bit !== (r.r2 ^ r.r3)) begin
          failures++; $display("FAIL: state %0d tail bit %b", s0, tail_bit);
        end
        a = ref_step(r, tail_bit, p);
        checks++;
        if (a != 1'b0) begin failures++; $display("FAIL: register input not zero"); end
      end
      checks++;
      if ({r.r1, r.r2, r.r3} != 3'b000) begin
        failures++; $display("FAIL: state %0d not terminated", s0);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
