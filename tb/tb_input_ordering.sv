// tb_input_ordering: streams two frames with random gaps and checks for
// every sample n that the (point, address) it is given decodes to
// (n1, n2, n3) = (point, addr div 7, addr mod 7) with
// n = (63 n1 + 56 n2 + 72 n3) mod 504, that no location is used twice in a
// frame, and that in_first marks sample 0.
module tb_input_ordering;
  import pfft_pkg::*;
  localparam int AW = 12;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = !clk;

  logic in_valid, in_ready, in_first, out_valid, out_ready;
  cplx_t in_data, out_data;
  logic [2:0] out_point;
  logic [AW-1:0] out_addr;
  int checks = 0, failures = 0;

  input_ordering #(.AW(AW)) dut (.*);

  int cnt = 0;
  bit used [8][64];
  always_ff @(posedge clk) begin
    in_valid  <= ($urandom % 3) != 0;
    out_ready <= ($urandom % 3) != 0;
    in_data   <= cplx_t'(24'($urandom));
    if (rst_n && in_valid && out_ready) begin
      int n, n1, n2, n3;
      n  = cnt % FRAME;
      n1 = int'(out_point);
      n2 = int'(out_addr) / 7;
      n3 = int'(out_addr) % 7;
      checks <= checks + 1;
      if (n2 > 8 || (63 * n1 + 56 * n2 + 72 * n3) % 504 != n || used[n1][out_addr[5:0]] ||
          in_first != (n == 0) || out_data != in_data || !out_valid || !in_ready) begin
        failures <= failures + 1;
        if (failures < 10) $display("FAIL n %0d point %0d addr %0d", n, out_point, out_addr);
      end
      used[n1][out_addr[5:0]] = (n != FRAME - 1);
      if (n == FRAME - 1) for (int p = 0; p < 8; p++) for (int a = 0; a < 64; a++) used[p][a] = 0;
      cnt <= cnt + 1;
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    wait (cnt == 2 * FRAME);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
