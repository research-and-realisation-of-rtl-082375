// tb_puncturer: checks the default rate-1/2 pattern (first half keeps even
// positions, second half odd ones), the restart of the phase, idle cycles,
// and a period-3 pattern instance.
module tb_puncturer;
  logic clk = 0, rst_n = 0, restart = 0, in_valid = 0, in_half = 0, in_par = 0;
  logic out_valid, out_par, out_valid3, out_par3;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  puncturer dut (.*);
  puncturer #(.PERIOD(3), .PAT1(3'b011), .PAT2(3'b100)) dut3 (
    .clk(clk), .rst_n(rst_n), .restart(restart), .in_valid(in_valid), .in_half(in_half),
    .in_par(in_par), .out_valid(out_valid3), .out_par(out_par3));

  task automatic half(bit h, int len);
    int j = 0;
    @(negedge clk); restart = 1; in_valid = 0; @(negedge clk); restart = 0;
    while (j < len) begin
      @(negedge clk);
      in_valid = ($urandom_range(3, 0) != 0);
      in_half = h; in_par = 1'($urandom);
      #1;
      if (in_valid) begin
        bit keep2, keep3;
        keep2 = h ? (j % 2 == 1) : (j % 2 == 0);
        keep3 = h ? (j % 3 == 2) : (j % 3 != 2);
        checks += 3;
        if (out_valid != keep2) begin failures++; $display("FAIL: p2 half %0d j %0d", h, j); end
        if (out_valid3 != keep3) begin failures++; $display("FAIL: p3 half %0d j %0d", h, j); end
        if (out_par != in_par || out_par3 != in_par) begin failures++; $display("FAIL: data"); end
        j++;
      end else begin
        checks++;
        if (out_valid || out_valid3) begin failures++; $display("FAIL: output while idle"); end
      end
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    half(0, 41); half(1, 41); half(0, 10); half(1, 7);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
