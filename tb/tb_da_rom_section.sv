// tb_da_rom_section: reads every address of section 1 of the 9-point ROM and
// of section 2 of the 7-point ROM (which has only one real point) and
// compares with partial sums of cos/sin computed here, in units of 2^-7.
module tb_da_rom_section;
  import pfft_pkg::*;
  logic [3:0] k9;  logic p9;  logic [2:0] x9;  logic signed [11:0] q9;
  logic [2:0] k7;  logic p7;  logic [2:0] x7;  logic signed [11:0] q7;
  int checks = 0, failures = 0;

  da_rom_section #(.N(9), .SS(3), .SEC(1)) u9 (.k(k9), .part(p9), .x(x9), .q(q9));
  da_rom_section #(.N(7), .SS(3), .SEC(2)) u7 (.k(k7), .part(p7), .x(x7), .q(q7));

  function automatic int expect_q(int nn, int sec, int kk, int pp, int xx);
    real s = 0.0;
    if (kk >= nn) return 0;
    for (int j = 0; j < 3; j++) begin
      int n = sec * 3 + j;
      real a = 2.0 * 3.141592653589793 * real'(n * kk) / real'(nn);
      if (n < nn && ((xx >> j) & 1) == 1) s += (pp == 1) ? $sin(a) : $cos(a);
    end
    return int'($floor(s * 128.0 + 0.5));
  endfunction

  initial begin
    for (int a = 0; a < 256; a++) begin
      {k9, p9, x9} = 8'(a);
      {k7, p7, x7} = 7'(a);
      #1;
      checks++;
      if (int'(q9) != expect_q(9, 1, int'(k9), int'(p9), int'(x9))) begin
        failures++; $display("FAIL N=9 addr %0d got %0d", a, q9);
      end
      if (a < 128) begin
        checks++;
        if (int'(q7) != expect_q(7, 2, int'(k7), int'(p7), int'(x7))) begin
          failures++; $display("FAIL N=7 addr %0d got %0d", a, q7);
        end
      end
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
