// tb_double_buffer_ram: fills the write bank with random bits chip by chip,
// swaps banks, reads every address of the other bank and checks each N-bit
// slice against a model while the new write bank is being overwritten with
// different data (the two sides must not disturb each other).
module tb_double_buffer_ram;
  localparam int N = 9, AW = 12, DEPTH = 1344;   // 56 words x 24 slices
  logic clk = 1'b0;
  always #5 clk = !clk;

  logic wr_bank = 1'b0, wr_en = 1'b0, wr_bit = 1'b0, rd_en = 1'b0;
  logic [3:0] wr_point = '0;
  logic [AW-1:0] wr_addr = '0, rd_addr = '0;
  logic [N-1:0] rd_slice;
  int checks = 0, failures = 0;

  double_buffer_ram #(.N(N), .AW(AW)) dut (.*);

  logic [N-1:0] model [2][DEPTH];

  task automatic fill(int bk, bit also_read, int rbk);
    for (int a = 0; a < DEPTH; a++)
      for (int p = 0; p < N; p++) begin
        @(negedge clk);
        wr_en = 1'b1; wr_point = 4'(p); wr_addr = AW'(a); wr_bit = 1'($urandom);
        model[bk][a][p] = wr_bit;
        if (also_read && p == 0) begin
          int ra;
          ra = a;
          rd_en = 1'b1; rd_addr = AW'(ra);
          @(posedge clk); #1;
          rd_en = 1'b0;
          checks++;
          if (rd_slice !== model[rbk][ra]) begin
            failures++;
            if (failures < 10) $display("FAIL bank %0d addr %0d got %b want %b", rbk, ra, rd_slice, model[rbk][ra]);
          end
        end
      end
    @(negedge clk); wr_en = 1'b0;
  endtask

  initial begin
    wr_bank = 1'b0;
    fill(0, 1'b0, 1);
    wr_bank = 1'b1;                 // swap: bank 0 is now read
    fill(1, 1'b1, 0);
    wr_bank = 1'b0;                 // swap back: bank 1 is read
    fill(0, 1'b1, 1);
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
