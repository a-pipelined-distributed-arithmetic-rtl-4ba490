// tb_stage_link: streams three frames of the 8-to-9 link and two of the
// 9-to-7 link with random valid/ready gaps and checks, for word s of each
// frame, point = (s div NPREV) mod NCUR and address = (s div (NPREV*NCUR))*NPREV
// + s mod NPREV, and that data, valid and ready pass through unchanged.
module tb_stage_link;
  import pfft_pkg::*;
  localparam int AW = 12;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = !clk;

  logic iv, ir, ov, orr;
  cplx_t id, od;
  logic [3:0] opt;
  logic [AW-1:0] oad;
  logic iv2, ir2, ov2, orr2;
  cplx_t id2, od2;
  logic [2:0] opt2;
  logic [AW-1:0] oad2;
  int checks = 0, failures = 0;

  stage_link #(.NPREV(8), .NCUR(9), .AW(AW)) u89 (
    .clk(clk), .rst_n(rst_n), .in_valid(iv), .in_ready(ir), .in_data(id),
    .out_valid(ov), .out_ready(orr), .out_data(od), .out_point(opt), .out_addr(oad));
  stage_link #(.NPREV(9), .NCUR(7), .AW(AW)) u97 (
    .clk(clk), .rst_n(rst_n), .in_valid(iv2), .in_ready(ir2), .in_data(id2),
    .out_valid(ov2), .out_ready(orr2), .out_data(od2), .out_point(opt2), .out_addr(oad2));

  int s1 = 0, s2 = 0;
  always_ff @(posedge clk) begin
    iv   <= ($urandom % 4) != 0;
    orr  <= ($urandom % 4) != 0;
    iv2  <= ($urandom % 4) != 0;
    orr2 <= ($urandom % 4) != 0;
    id   <= cplx_t'(24'($urandom));
    id2  <= cplx_t'(24'($urandom));
    if (rst_n) begin
      checks <= checks + 2;
      if (ov != iv || ir != orr || od != id || ov2 != iv2 || ir2 != orr2 || od2 != id2) begin
        failures <= failures + 1; $display("FAIL pass-through");
      end
      if (iv && orr) begin
        int s;
        s = s1 % FRAME;
        if (int'(opt) != (s / 8) % 9 || int'(oad) != (s / 72) * 8 + s % 8) begin
          failures <= failures + 1;
          if (failures < 10) $display("FAIL 8->9 word %0d: point %0d addr %0d", s, opt, oad);
        end
        s1 <= s1 + 1;
      end
      if (iv2 && orr2) begin
        int s;
        s = s2 % FRAME;
        if (int'(opt2) != (s / 9) % 7 || int'(oad2) != (s / 63) * 9 + s % 9) begin
          failures <= failures + 1;
          if (failures < 10) $display("FAIL 9->7 word %0d: point %0d addr %0d", s, opt2, oad2);
        end
        s2 <= s2 + 1;
      end
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    wait (s1 >= 3 * FRAME && s2 >= 2 * FRAME);
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
