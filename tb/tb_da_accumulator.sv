// tb_da_accumulator: feeds back-to-back output words of 24 random partial
// sums (random real/imaginary output part) and checks each result against
//  - the exact value sum_c sign_c * p_c * 2^(c/2 - 11), within 1 LSB
//    (the right shifts truncate), and
//  - a cycle model of the shift-every-second-cycle accumulation, exactly.
// sign_c is -1 for the sign bit level and for imaginary slices of a real
// output word (both together cancel). Also checks the 3-cycle latency from
// the last slice to res_valid and that random en stalls lose nothing.
module tb_da_accumulator;
  import pfft_pkg::*;
  localparam int NWORDS = 400;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = !clk;

  logic en = 1'b1, in_valid = 1'b0, in_part = 1'b0, res_valid, res_part;
  logic signed [11:0] in_p = '0;
  logic [4:0] in_c = '0;
  logic signed [11:0] res;
  int checks = 0, failures = 0;

  da_accumulator #(.W(12)) dut (.*);

  int  pv [NWORDS][SLICES];
  bit  pt [NWORDS];
  int  exact_lsb [NWORDS];
  int  model [NWORDS];
  int  nres = 0, last_in_cyc = 0, cyc = 0, stalls = 0;

  initial begin
    for (int w = 0; w < NWORDS; w++) begin
      real e;
      int  acc;
      e = 0.0;
      acc = 0;
      pt[w] = 1'($urandom);
      for (int c = 0; c < SLICES; c++) begin
        int  sgn;
        // partial sums small enough that the word fits in B bits, as the
        // lookup tables guarantee
        pv[w][c] = int'($urandom % 1001) - 500;
        sgn = 1;
        if (c % 2 == 1 && !pt[w]) sgn = -sgn;
        if (c / 2 == B - 1) sgn = -sgn;
        e += real'(sgn * pv[w][c]) * (2.0 ** (c / 2 - (B - 1)));
        if (c % 2 == 0 && c > 0) acc = acc >>> 1;
        acc += sgn * pv[w][c];
      end
      model[w] = acc;
      exact_lsb[w] = int'($floor(e));
    end
  end

  always_ff @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && res_valid) begin
      checks <= checks + 2;
      if (int'(res) != model[nres] || res_part != pt[nres]) begin
        failures <= failures + 1;
        if (failures < 10) $display("FAIL word %0d got %0d want %0d", nres, res, model[nres]);
      end
      if (int'(res) - exact_lsb[nres] > 1 || int'(res) - exact_lsb[nres] < -1) begin
        failures <= failures + 1;
        if (failures < 10) $display("FAIL word %0d got %0d exact %0d", nres, res, exact_lsb[nres]);
      end
      nres <= nres + 1;
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int w = 0; w < NWORDS; w++)
      for (int c = 0; c < SLICES; c++) begin
        @(negedge clk);
        in_valid = 1'b1; in_p = 12'(pv[w][c]); in_c = 5'(c); in_part = pt[w];
        en = (w < NWORDS / 2) ? 1'b1 : (($urandom % 4) != 0);
        if (!en) stalls++;
        @(posedge clk);
        while (!en) begin
          @(negedge clk); en = 1'b1;
          @(posedge clk);
        end
      end
    @(negedge clk); in_valid = 1'b0; en = 1'b1;
    // latency: the last word's result appears 3 cycles after its last slice
    last_in_cyc = cyc;
    wait (nres == NWORDS);
    checks++;
    if (cyc - last_in_cyc != 2 || stalls == 0) begin
      failures++; $display("FAIL latency %0d, stalls %0d", cyc - last_in_cyc, stalls);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
