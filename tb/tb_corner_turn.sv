// tb_corner_turn: sends random complex words with random point numbers and
// word addresses, captures every bit write, and checks that bit 2b of the
// word is re[b] and bit 2b+1 is im[b] at address addr*24 + c of the right
// chip, that each word takes 24 cycles and that words can follow back to back.
module tb_corner_turn;
  import pfft_pkg::*;
  localparam int N = 9, AW = 12, NW = 170;   // 170 x 24 bits fill a 4K chip
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = !clk;

  logic in_valid = 1'b0, in_ready, wr_en, wr_bit, word_done;
  cplx_t in_data = '0;
  logic [3:0] in_point = '0, wr_point;
  logic [AW-1:0] in_addr = '0, wr_addr;
  int checks = 0, failures = 0;

  corner_turn #(.N(N), .AW(AW)) dut (.*);

  cplx_t wd [NW];
  int    wp [NW], wa [NW];
  int    nwr = 0, ndone = 0, cyc = 0, first_wr = -1, last_wr = -1;
  bit    mem [N][2**AW];

  always_ff @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && wr_en) begin
      mem[wr_point][wr_addr] <= wr_bit;
      nwr <= nwr + 1;
      if (first_wr < 0) first_wr <= cyc;
      last_wr <= cyc;
    end
    if (rst_n && word_done) ndone <= ndone + 1;
  end

  initial begin
    for (int i = 0; i < NW; i++) begin
      wd[i] = cplx_t'($urandom);
      wp[i] = int'($urandom % N);
      wa[i] = i;   // distinct word addresses
    end
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < NW; i++) begin
      @(negedge clk);
      in_valid = 1'b1; in_data = wd[i]; in_point = 4'(wp[i]); in_addr = AW'(wa[i]);
      // in_ready depends on state only: sampled mid-cycle it tells whether
      // the next rising edge takes the word
      while (!in_ready) @(negedge clk);
      @(posedge clk);
      // random gaps in the second half
      if (i > NW / 2) begin
        @(negedge clk); in_valid = 1'b0;
        repeat ($urandom % 30) @(negedge clk);
      end
    end
    @(negedge clk); in_valid = 1'b0;
    repeat (40) @(posedge clk);
    for (int i = 0; i < NW; i++)
      for (int c = 0; c < SLICES; c++) begin
        bit exp_b;
        exp_b = (c % 2) ? wd[i].im[c / 2] : wd[i].re[c / 2];
        checks++;
        if (mem[wp[i]][wa[i] * SLICES + c] !== exp_b) begin
          failures++;
          if (failures < 10) $display("FAIL word %0d slice %0d", i, c);
        end
      end
    checks++;
    if (nwr != NW * SLICES || ndone != NW) begin
      failures++; $display("FAIL %0d bit writes, %0d words", nwr, ndone);
    end
    checks++;
    // the first NW/2+2 words go back to back: 24 cycles each
    if (last_wr - first_wr + 1 < NW * SLICES) begin
      failures++; $display("FAIL writes too fast");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // back-to-back cadence: in_ready must stay low for 23 cycles after a word is taken
  int busy_cnt = 0;
  always_ff @(posedge clk) if (rst_n) begin
    if (in_valid && in_ready) busy_cnt <= SLICES - 1;
    else if (busy_cnt > 0) begin
      busy_cnt <= busy_cnt - 1;
      checks <= checks + 1;
      if (in_ready && busy_cnt > 1) begin failures <= failures + 1; $display("FAIL ready early"); end
    end
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
