// tb_read_ctrl: runs two frames of the 9-point stage configuration (T = 56
// transforms, stride 7) with en dropping at random, the second started on the
// cycle of the first frame's done pulse (no idle cycle allowed in between), and checks every issued
// read against the expected nesting: slice c fastest, then the word select
// {k, part}, then transform t, with word address (t mod 7)*8 + t div 7.
// Also checks the read count, the done pulse and that nothing moves while en
// is low.
module tb_read_ctrl;
  import pfft_pkg::*;
  localparam int N = 9, T = 56, P = 7, AW = 12;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = !clk;

  logic start, start0 = 1'b0, en = 1'b1, busy, rd_en, part, done;
  logic [AW-1:0] rd_addr;
  logic [3:0] k;
  logic [4:0] c, wsel;
  int checks = 0, failures = 0;

  read_ctrl #(.N(N), .T(T), .P(P), .AW(AW)) dut (.*);

  int idx = 0, ndone = 0, held = 0, idle = 0, frame_reads;
  assign frame_reads = T * 2 * N * SLICES;
  assign start = start0 || (done && ndone == 0);
  always_ff @(posedge clk) begin
    if (rst_n) en <= ($urandom % 8) != 0;
    if (rst_n && rd_en) begin
      int t, w, cc, a;
      cc = idx % SLICES;
      w  = (idx / SLICES) % (2 * N);
      t  = (idx % frame_reads) / (SLICES * 2 * N);
      a  = (t % P) * (T / P) + t / P;
      checks <= checks + 1;
      if (rd_addr != AW'(a * SLICES + cc) || c != 5'(cc) || k != 4'(w / 2) ||
          part != 1'(w % 2) || wsel != 5'(w)) begin
        failures <= failures + 1;
        if (failures < 10) $display("FAIL read %0d: addr %0d k %0d part %0d c %0d", idx, rd_addr, k, part, c);
      end
      idx <= idx + 1;
    end
    if (busy && !en) held <= held + 1;
    if (rst_n && !busy && idx > 0 && idx < 2 * frame_reads) idle <= idle + 1;
    if (!en && rd_en) begin failures <= failures + 1; $display("FAIL read while held"); end
    if (done) begin
      ndone <= ndone + 1;
      checks <= checks + 1;
      if (idx % frame_reads != frame_reads - 1) begin failures <= failures + 1; $display("FAIL done at %0d", idx); end
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk); start0 = 1'b1;
    @(negedge clk); start0 = 1'b0;
    wait (idx == 2 * frame_reads);
    repeat (5) @(posedge clk);
    checks++;
    if (busy || ndone != 2 || held == 0 || idle != 0) begin
      failures++; $display("FAIL %0d reads, %0d done, %0d held, %0d idle", idx, ndone, held, idle);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
