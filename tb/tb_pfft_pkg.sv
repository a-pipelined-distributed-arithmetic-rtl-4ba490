// tb_pfft_pkg: checks the package's table generators. in_index must map the
// 504 triples (n1, n2, n3) one-to-one onto 0..503 and satisfy
// n mod 8 = 63*n1 mod 8 etc.; out_seq must be a permutation whose position s
// decodes to (k mod 8, k mod 9, k mod 7); kernel must equal cos/sin of
// 2*pi*n*k/N; and the per-stage scale 2^GROWTH_SHIFT must exceed N*sqrt(2)
// for every factor so that no stage can overflow.
module tb_pfft_pkg;
  import pfft_pkg::*;
  int checks = 0, failures = 0;
  bit seen_in [FRAME];
  bit seen_out [FRAME];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    for (int n1 = 0; n1 < N1; n1++)
      for (int n2 = 0; n2 < N2; n2++)
        for (int n3 = 0; n3 < N3; n3++) begin
          int n;
          n = in_index(n1, n2, n3);
          check(n >= 0 && n < FRAME && !seen_in[n], $sformatf("in_index(%0d,%0d,%0d)=%0d", n1, n2, n3, n));
          if (n >= 0 && n < FRAME) seen_in[n] = 1'b1;
          check(n % N1 == (63 * n1) % N1 && n % N2 == (56 * n2) % N2 && n % N3 == (72 * n3) % N3,
                $sformatf("residues of %0d", n));
        end
    for (int k = 0; k < FRAME; k++) begin
      int s;
      s = out_seq(k);
      check(s >= 0 && s < FRAME && !seen_out[s], $sformatf("out_seq(%0d)=%0d", k, s));
      if (s >= 0 && s < FRAME) seen_out[s] = 1'b1;
      check(s / 63 == k % 8 && (s / 7) % 9 == k % 9 && s % 7 == k % 7, $sformatf("decode of %0d", s));
    end
    for (int nn = 7; nn <= 9; nn++)
      for (int n = 0; n < nn; n++)
        for (int k = 0; k < nn; k++) begin
          real a, dc, ds;
          a  = 2.0 * 3.141592653589793 * real'(n * k) / real'(nn);
          dc = kernel(n, k, nn, 1'b0) - $cos(a);
          ds = kernel(n, k, nn, 1'b1) - $sin(a);
          check(dc < 1e-9 && dc > -1e-9 && ds < 1e-9 && ds > -1e-9, $sformatf("kernel %0d %0d %0d", nn, n, k));
        end
    check(B == 12 && FRAME == N1 * N2 * N3 && SLICES == 24 && ROM_FRAC == B - 1 - GROWTH_SHIFT, "constants");
    check(real'(2 ** GROWTH_SHIFT) > 9.0 * 1.41421356, "growth bound");
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
