// tb_pfft504: end-to-end test of the 504-point processor at its default size.
//
// Eight frames are streamed in back to back: random, a single complex tone,
// full-scale corner values, then five random frames. Every output bin is compared with
// a floating-point 504-point DFT (kernel exp(+j 2 pi n k / 504), divided by
// 4096) computed here; the allowed error is TOL LSB per part. During the
// output of frame 1 the sink stops taking data for a long time so that the
// backpressure reaches every stage (stalls). The test counts buffer swaps,
// stall cycles and the frame period after the pipeline has settled
// (exactly 504 points x 48 cycles).
module tb_pfft504;
  import pfft_pkg::*;

  localparam int NF  = 8;
  localparam int TOL = 3;

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

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    for (int f = 0; f < NF; f++)
      for (int n = 0; n < FRAME; n++) begin
        case (f)
          1: begin
            real a;
            a = -2.0 * PI * real'(37 * n) / real'(FRAME);
            xr[f][n] = int'($floor(1500.0 * $cos(a) + 0.5));
            xi[f][n] = int'($floor(1500.0 * $sin(a) + 0.5));
          end
          2: begin
            xr[f][n] = ($urandom % 2) ? 2047 : -2048;
            xi[f][n] = ($urandom % 2) ? 2047 : -2048;
          end
          default: begin
            xr[f][n] = int'($urandom % 4096) - 2048;
            xi[f][n] = int'($urandom % 4096) - 2048;
          end
        endcase
      end
  end

  // source: one sample whenever the processor takes one
  int in_f = 0, in_n = 0;
  always_comb begin
    in_valid   = rst_n && (in_f < NF);
    in_data.re = (in_f < NF) ? 12'(xr[in_f][in_n]) : '0;
    in_data.im = (in_f < NF) ? 12'(xi[in_f][in_n]) : '0;
  end
  always_ff @(posedge clk) if (in_valid && in_ready) begin
    if (in_n == FRAME - 1) begin in_n <= 0; in_f <= in_f + 1; end
    else in_n <= in_n + 1;
  end

  // sink with a long pause during frame 1
  int out_f = 0, out_k = 0, cyc = 0, pause = 0;
  int maxerr = 0;
  int swaps [4] = '{0, 0, 0, 0};
  int stalls [3] = '{0, 0, 0};
  int last_t [NF];

  always_comb out_ready = !(out_f == 1 && out_k == 100 && pause < 150000);

  function automatic void ref_bin(int f, int k, output real yr, output real yi);
    yr = 0.0; yi = 0.0;
    for (int n = 0; n < FRAME; n++) begin
      real a;
      a = 2.0 * PI * real'((n * k) % FRAME) / real'(FRAME);
      yr += xr[f][n] * $cos(a) - xi[f][n] * $sin(a);
      yi += xr[f][n] * $sin(a) + xi[f][n] * $cos(a);
    end
    yr /= 4096.0; yi /= 4096.0;
  endfunction

  always_ff @(posedge clk) begin
    cyc <= cyc + 1;
    if (out_f == 1 && out_k == 100) pause <= pause + 1;
    for (int i = 0; i < 4; i++) if (swap[i]) swaps[i] <= swaps[i] + 1;
    for (int i = 0; i < 3; i++) if (stall[i]) stalls[i] <= stalls[i] + 1;
    if (out_valid && out_ready && out_f < NF) begin
      real yr, yi, er, ei;
      ref_bin(out_f, out_k, yr, yi);
      er = real'(out_data.re) - yr;
      if (er < 0.0) er = -er;
      ei = real'(out_data.im) - yi;
      if (ei < 0.0) ei = -ei;
      if (int'(er) > maxerr) maxerr = int'(er);
      if (int'(ei) > maxerr) maxerr = int'(ei);
      check(er <= TOL && ei <= TOL,
            $sformatf("frame %0d bin %0d got (%0d,%0d) want (%.1f,%.1f)",
                      out_f, out_k, out_data.re, out_data.im, yr, yi));
      check(out_last == (out_k == FRAME - 1), $sformatf("out_last at bin %0d", out_k));
      if (out_k == FRAME - 1) begin
        last_t[out_f] = cyc;
        out_k <= 0;
        out_f <= out_f + 1;
      end else out_k <= out_k + 1;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (out_f == NF);
    repeat (10) @(posedge clk);
    $display("max error %0d LSB; swaps %0d %0d %0d %0d; stall cycles %0d %0d %0d",
             maxerr, swaps[0], swaps[1], swaps[2], swaps[3], stalls[0], stalls[1], stalls[2]);
    $display("frame period: %0d", last_t[NF-1] - last_t[NF-2]);
    for (int i = 0; i < 4; i++) check(swaps[i] == NF, $sformatf("buffer %0d swapped %0d times", i, swaps[i]));
    for (int i = 0; i < 3; i++) check(stalls[i] > 0, $sformatf("stage %0d never stalled", i));
    // steady state: one complex point per 48 cycles
    check(last_t[NF-1] - last_t[NF-2] == FRAME * 48,
          $sformatf("frame period %0d", last_t[NF-1] - last_t[NF-2]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (900000) @(posedge clk);
    failures++;
    $display("watchdog: stopped in frame %0d bin %0d", out_f, out_k);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
