// tb_mtbc_interleaver: loads a residue-preserving random table, writes a
// random block of K bits in natural order and reads it back in permuted
// order; repeats with a second block length using the same buffer.
module tb_mtbc_interleaver;
  import mtbc_ref_pkg::*;
  localparam int K_MAX = 451;
  localparam int AW = $clog2(K_MAX);
  logic clk = 0, wr_en = 0, wr_bit = 0, perm_we = 0, rd_bit;
  logic [AW-1:0] wr_addr = '0, perm_addr = '0, perm_data = '0, rd_idx = '0, rd_src;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  mtbc_interleaver #(.K_MAX(K_MAX)) dut (.*);

  task automatic run(int k);
    int perm[];
    bit data[];
    ref_make_perm(k, perm);
    data = new[k];
    for (int q = 0; q < k; q++) begin
      @(negedge clk); perm_we = 1; perm_addr = AW'(q); perm_data = AW'(perm[q]);
    end
    @(negedge clk); perm_we = 0;
    for (int t = 0; t < k; t++) begin
      data[t] = 1'($urandom);
      @(negedge clk); wr_en = 1; wr_addr = AW'(t); wr_bit = data[t];
    end
    @(negedge clk); wr_en = 0;
    for (int q = 0; q < k; q++) begin
      @(negedge clk); rd_idx = AW'(q);
      #1;
      checks += 3;
      if (rd_bit != data[perm[q]]) begin failures++; $display("FAIL: bit at q=%0d", q); end
      if (rd_src != AW'(perm[q]))  begin failures++; $display("FAIL: source at q=%0d", q); end
      if (int'(rd_src) % 7 != q % 7) begin failures++; $display("FAIL: residue at q=%0d", q); end
    end
  endtask

  initial begin
    run(451);
    run(443);
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
