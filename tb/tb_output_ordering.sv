// tb_output_ordering: writes three frames in the last stage's order (word s
// carries s and the frame number as data) with random valid/ready gaps and
// checks that bin k comes out carrying the s whose (s div 63, (s div 7) mod 9,
// s mod 7) equal (k mod 8, k mod 9, k mod 7), found here by search, that
// out_last marks bin 503, and that frames stay in order across bank swaps.
module tb_output_ordering;
  import pfft_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = !clk;

  logic in_valid, in_ready, out_valid, out_ready, out_last, swap;
  cplx_t in_data, out_data;
  int checks = 0, failures = 0;

  output_ordering dut (.*);

  int want_s [FRAME];
  initial
    for (int k = 0; k < FRAME; k++)
      for (int s = 0; s < FRAME; s++)
        if (s / 63 == k % 8 && (s / 7) % 9 == k % 9 && s % 7 == k % 7) want_s[k] = s;

  int wi = 0, ri = 0, nswap = 0;
  always_comb begin
    in_data.re = 12'((wi % FRAME));
    in_data.im = 12'((wi / FRAME));
  end
  always_ff @(posedge clk) begin
    in_valid  <= (wi < 3 * FRAME) && (($urandom % 2) != 0);
    out_ready <= ($urandom % 3) != 0;
    if (rst_n && swap) nswap <= nswap + 1;
    if (rst_n && in_valid && in_ready) wi <= wi + 1;
    if (rst_n && out_valid && out_ready) begin
      int k;
      k = ri % FRAME;
      checks <= checks + 1;
      if (int'(out_data.re) != want_s[k] || int'(out_data.im) != ri / FRAME || out_last != (k == FRAME - 1)) begin
        failures <= failures + 1;
        if (failures < 10) $display("FAIL bin %0d got s=%0d frame %0d", ri, out_data.re, out_data.im);
      end
      ri <= ri + 1;
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    wait (ri == 3 * FRAME);
    checks++;
    if (nswap != 3) begin failures++; $display("FAIL %0d swaps", nswap); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
