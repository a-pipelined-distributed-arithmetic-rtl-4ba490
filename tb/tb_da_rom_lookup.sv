// tb_da_rom_lookup: for the 9- and 8-point lookups, every bit slice, every k
// and both parts, checks that the sectioned ROM output is within the section
// rounding error (1.5 LSB for three sections) of the exact partial sum
// 128 * sum_n x_n Re/Im(W^(nk)), and that unused k read zero.
module tb_da_rom_lookup;
  import pfft_pkg::*;
  logic [8:0] s9; logic [3:0] k9; logic p9; logic signed [11:0] q9;
  logic [7:0] s8; logic [2:0] k8; logic p8; logic signed [11:0] q8;
  int checks = 0, failures = 0;

  da_rom_lookup #(.N(9)) u9 (.slice(s9), .k(k9), .part(p9), .q(q9));
  da_rom_lookup #(.N(8)) u8 (.slice(s8), .k(k8), .part(p8), .q(q8));

  function automatic real exact(int nn, int kk, int pp, int xx);
    real s = 0.0;
    if (kk >= nn) return 0.0;
    for (int n = 0; n < nn; n++) begin
      real a = 2.0 * 3.141592653589793 * real'(n * kk) / real'(nn);
      if (((xx >> n) & 1) == 1) s += (pp == 1) ? $sin(a) : $cos(a);
    end
    return s * 128.0;
  endfunction

  task automatic cmp(int got, real want, real tol, string what);
    real d;
    d = real'(got) - want;
    checks++;
    if (d > tol || d < -tol) begin
      failures++;
      if (failures < 10) $display("FAIL %s got %0d want %.2f", what, got, want);
    end
  endtask

  initial begin
    for (int x = 0; x < 512; x++)
      for (int kk = 0; kk < 16; kk++)
        for (int pp = 0; pp < 2; pp++) begin
          s9 = 9'(x); k9 = 4'(kk); p9 = 1'(pp);
          s8 = 8'(x); k8 = 3'(kk); p8 = 1'(pp);
          #1;
          cmp(int'(q9), exact(9, kk, pp, x), 1.5, $sformatf("N=9 x=%0d k=%0d p=%0d", x, kk, pp));
          if (x < 256 && kk < 8)
            cmp(int'(q8), exact(8, kk, pp, x), 1.5, $sformatf("N=8 x=%0d k=%0d p=%0d", x, kk, pp));
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
