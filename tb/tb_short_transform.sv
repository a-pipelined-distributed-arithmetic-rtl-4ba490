// tb_short_transform: the 9-point stage (stride 7) on full 504-word frames.
// Frame 0 is written and then, while it is being transformed, frame 1 is
// written into the other bank (double buffering). Every output point is
// compared with a floating-point 9-point DFT / 16 of the words stored at the
// word address the stage should read for that transform. During frame 0 the
// output is always taken and consecutive points must be exactly 48 cycles
// apart; during frame 1 out_ready drops at random, which must stall the
// stage without losing or repeating points.
module tb_short_transform;
  import pfft_pkg::*;
  localparam int N = 9, P = 7, T = FRAME / N, AW = 12, NF = 2, TOL = 3;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = !clk;

  logic in_valid = 1'b0, in_ready, out_valid, out_ready, bank, swap, stall;
  cplx_t in_data = '0, out_data;
  logic [3:0] in_point = '0;
  logic [AW-1:0] in_addr = '0;
  int checks = 0, failures = 0;

  short_transform #(.N(N), .P(P), .AW(AW)) dut (.*);

  int xr [NF][T][N];
  int xi [NF][T][N];

  initial
    for (int f = 0; f < NF; f++)
      for (int a = 0; a < T; a++)
        for (int n = 0; n < N; n++) begin
          xr[f][a][n] = int'($urandom % 4096) - 2048;
          xi[f][a][n] = int'($urandom % 4096) - 2048;
        end

  // source: word j of a frame goes to chip j % 9, word address j / 9
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int f = 0; f < NF; f++)
      for (int j = 0; j < FRAME; j++) begin
        @(negedge clk);
        in_valid   = 1'b1;
        in_point   = 4'(j % N);
        in_addr    = AW'(j / N);
        in_data.re = 12'(xr[f][j / N][j % N]);
        in_data.im = 12'(xi[f][j / N][j % N]);
        while (!in_ready) @(negedge clk);
        @(posedge clk);
      end
    @(negedge clk); in_valid = 1'b0;
  end

  int of = 0, ot = 0, ok = 0, cyc = 0, last_out = -1, nswap = 0, nstall = 0;
  int maxerr = 0;
  always_ff @(posedge clk) begin
    cyc <= cyc + 1;
    out_ready <= (of == 0) ? 1'b1 : (($urandom % 3) != 0);
    if (rst_n && swap) nswap <= nswap + 1;
    if (rst_n && stall) nstall <= nstall + 1;
    if (rst_n && out_valid && out_ready && of < NF) begin
      int a;
      real yr, yi, er, ei;
      a = (ot % P) * (T / P) + ot / P;
      yr = 0.0; yi = 0.0;
      for (int n = 0; n < N; n++) begin
        real ang;
        ang = 2.0 * PI * real'((n * ok) % N) / real'(N);
        yr += xr[of][a][n] * $cos(ang) - xi[of][a][n] * $sin(ang);
        yi += xr[of][a][n] * $sin(ang) + xi[of][a][n] * $cos(ang);
      end
      er = real'(out_data.re) - yr / 16.0; if (er < 0.0) er = -er;
      ei = real'(out_data.im) - yi / 16.0; if (ei < 0.0) ei = -ei;
      if (int'(er) > maxerr) maxerr = int'(er);
      if (int'(ei) > maxerr) maxerr = int'(ei);
      checks <= checks + 1;
      if (er > TOL || ei > TOL) begin
        failures <= failures + 1;
        if (failures < 10) $display("FAIL frame %0d t %0d k %0d got (%0d,%0d) want (%.1f,%.1f)",
                                    of, ot, ok, int'(out_data.re), int'(out_data.im), yr / 16.0, yi / 16.0);
      end
      // one complex point per 48 cycles while nothing stalls
      if (of == 0 && last_out >= 0) begin
        checks <= checks + 2;
        if (cyc - last_out != 2 * SLICES) begin
          failures <= failures + 1;
          if (failures < 10) $display("FAIL spacing %0d at t %0d k %0d", cyc - last_out, ot, ok);
        end
      end
      last_out <= cyc;
      if (ok == N - 1) begin
        ok <= 0;
        if (ot == T - 1) begin ot <= 0; of <= of + 1; end
        else ot <= ot + 1;
      end else ok <= ok + 1;
    end
  end

  initial begin
    wait (of == NF);
    repeat (5) @(posedge clk);
    $display("max error %0d, swaps %0d, stall cycles %0d", maxerr, nswap, nstall);
    checks++;
    if (nswap != NF || nstall == 0) begin failures++; $display("FAIL swaps %0d stalls %0d", nswap, nstall); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
