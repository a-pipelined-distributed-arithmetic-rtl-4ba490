// double_buffer_ram: the bit-slice double buffer in front of the ROM lookup of
// a short transform stage.
//
// Two banks, each of N 1-bit RAM chips (bit_ram, 4K x 1). Bank wr_bank is the
// write side: the corner turner writes one bit at a time into chip wr_point.
// The other bank is the read side: all N chips are read at the same address,
// giving one bit slice (bit k of chip n = bit of input point n).
// The read is registered: rd_slice is valid one cycle after rd_en.
// The bank multiplexer on the read side is selected by the registered bank
// number, so a bank swap never mixes slices of two frames.
// Two banks of N 4K x 1 chips, one written while the other is read, as in the
// original machine; the bank control is this design's.
module double_buffer_ram #(
  parameter int N  = 9,
  parameter int AW = 12
) (
  input  logic                 clk,
  input  logic                 wr_bank,     // bank being written; the other is read
  input  logic                 wr_en,
  input  logic [$clog2(N)-1:0] wr_point,
  input  logic [AW-1:0]        wr_addr,
  input  logic                 wr_bit,
  input  logic                 rd_en,
  input  logic [AW-1:0]        rd_addr,
  output logic [N-1:0]         rd_slice
);
  logic [N-1:0] slice [2];
  logic         rd_bank_q;

  for (genvar bk = 0; bk < 2; bk++) begin : g_bank
    for (genvar p = 0; p < N; p++) begin : g_chip
      bit_ram #(.AW(AW)) u_ram (
        .clk   (clk),
        .we    (wr_en && (wr_bank == 1'(bk)) && (wr_point == $clog2(N)'(p))),
        .waddr (wr_addr),
        .wd    (wr_bit),
        .re    (rd_en && (wr_bank != 1'(bk))),
        .raddr (rd_addr),
        .rd    (slice[bk][p])
      );
    end
  end

  always_ff @(posedge clk) begin
    if (rd_en) rd_bank_q <= !wr_bank;
  end

  assign rd_slice = slice[rd_bank_q];
endmodule
