// tb_sova_bmu: exhaustive check of the branch metrics over all 4096
// combinations of the three 4-bit soft inputs.
module tb_sova_bmu;
  import mtbc_pkg::*;
  soft_t ys, la, yp;
  logic signed [W_IN+1:0] bm [4];
  logic signed [W_IN:0] intrinsic;
  int checks = 0, failures = 0;

  sova_bmu dut (.*);

  initial begin
    for (int a = -8; a < 8; a++)
      for (int b = -8; b < 8; b++)
        for (int c = -8; c < 8; c++) begin
          ys = soft_t'(a); la = soft_t'(b); yp = soft_t'(c);
          #1;
          for (int u = 0; u < 2; u++)
            for (int p = 0; p < 2; p++) begin
              int exp;
              exp = u * (a + b) + p * c;
              checks++;
              if (int'(bm[u*2+p]) != exp) begin
                failures++;
                if (failures < 10) $display("FAIL: ys=%0d la=%0d yp=%0d u=%0d p=%0d bm=%0d exp=%0d",
                                            a, b, c, u, p, bm[u*2+p], exp);
              end
            end
          checks++;
          if (int'(intrinsic) != a + b) failures++;
        end
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
