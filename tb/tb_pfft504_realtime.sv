// tb_pfft504_realtime: the processor at its default size fed in real time,
// one complex sample every 48 clock cycles (9.6 us per point at a 200 ns
// clock, 104 kHz), for 30 consecutive frames. A processor that needs even one
// cycle more than 48 x 504 per frame would make the source wait within this
// run. Checks that no sample ever waits, that every bin of every frame
// matches a floating-point DFT / 4096 within 3 LSB, and that output frames
// are exactly 504 x 48 cycles apart.
module tb_pfft504_realtime;
  import pfft_pkg::*;

  localparam int NF  = 30;
  localparam int TOL = 3;
  localparam int GAP = 48;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = !clk;

  logic       in_valid, in_ready, out_valid, out_ready, out_last;
  cplx_t      in_data, out_data;
  logic [3:0] swap;
  logic [2:0] stall;

  pfft504 dut (.*);

  int checks = 0, failures = 0;
  int xr [NF][FRAME];
  int xi [NF][FRAME];
  real cs [FRAME];
  real sn [FRAME];

  initial begin
    for (int m = 0; m < FRAME; m++) begin
      cs[m] = $cos(2.0 * PI * real'(m) / real'(FRAME));
      sn[m] = $sin(2.0 * PI * real'(m) / real'(FRAME));
    end
    for (int f = 0; f < NF; f++)
      for (int n = 0; n < FRAME; n++) begin
        xr[f][n] = int'($urandom % 4096) - 2048;
        xi[f][n] = int'($urandom % 4096) - 2048;
      end
  end

  // source: sample i becomes available at cycle i*48 and waits if not taken
  int cyc = 0, idx = 0, waits = 0;
  always_comb begin
    in_valid   = rst_n && (idx < NF * FRAME) && (cyc >= idx * GAP);
    in_data.re = 12'(xr[(idx / FRAME) % NF][idx % FRAME]);
    in_data.im = 12'(xi[(idx / FRAME) % NF][idx % FRAME]);
  end
  assign out_ready = 1'b1;

  int out_f = 0, out_k = 0, maxerr = 0, prev_last = -1, nper = 0;
  always_ff @(posedge clk) begin
    if (rst_n) cyc <= cyc + 1;
    if (in_valid && in_ready) idx <= idx + 1;
    if (in_valid && !in_ready) waits <= waits + 1;
    if (out_valid && out_f < NF) begin
      real yr, yi, er, ei;
      yr = 0.0; yi = 0.0;
      for (int n = 0; n < FRAME; n++) begin
        int m;
        m = (n * out_k) % FRAME;
        yr += xr[out_f][n] * cs[m] - xi[out_f][n] * sn[m];
        yi += xr[out_f][n] * sn[m] + xi[out_f][n] * cs[m];
      end
      er = real'(out_data.re) - yr / 4096.0; if (er < 0.0) er = -er;
      ei = real'(out_data.im) - yi / 4096.0; if (ei < 0.0) ei = -ei;
      if (int'(er) > maxerr) maxerr = int'(er);
      if (int'(ei) > maxerr) maxerr = int'(ei);
      checks <= checks + 1;
      if (er > TOL || ei > TOL) begin
        failures <= failures + 1;
        if (failures < 10) $display("FAIL frame %0d bin %0d", out_f, out_k);
      end
      if (out_last) begin
        if (prev_last >= 0) begin
          checks <= checks + 2;
          nper <= nper + 1;
          if (cyc - prev_last != FRAME * GAP) begin
            failures <= failures + 1;
            $display("FAIL frame period %0d", cyc - prev_last);
          end
        end
        prev_last <= cyc;
        out_k <= 0;
        out_f <= out_f + 1;
      end else out_k <= out_k + 1;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (out_f == NF);
    repeat (5) @(posedge clk);
    $display("frames %0d, max error %0d LSB, source waited %0d cycles, periods checked %0d",
             out_f, maxerr, waits, nper);
    checks++;
    if (waits != 0) begin failures++; $display("FAIL the source had to wait"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat ((NF + 6) * FRAME * GAP) @(posedge clk);
    failures++;
    $display("watchdog: frame %0d bin %0d", out_f, out_k);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
