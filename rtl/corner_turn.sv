// corner_turn: word-to-bit-slice writer of a short transform stage.
//
// A short transform reads its data one bit slice at a time (bit b of every
// input point), while data arrive as whole complex words. Each input point of
// the transform has its own 1-bit-wide RAM chip; corner turning stores a word
// in the chip of its point (chip select = in_point) one bit per cycle, the bit
// being picked by a 2B:1 multiplexer driven by a slice counter. Reading all
// chips at the same address afterwards yields a bit slice.
//
// Bit order inside a word (slice counter c = 0 .. 2B-1): r0, i0, r1, i1, ...,
// r(B-1), i(B-1), i.e. bit c/2 of the real part when c is even and of the
// imaginary part when c is odd. The RAM bit address is in_addr*2B + c.
//
// Handshake: a word is taken when in_valid && in_ready. Its 2B bits are
// written on the following 2B cycles (wr_en high). in_ready is high when idle
// and on the cycle the last bit is written, so back-to-back words take 2B
// cycles each. word_done pulses with the last bit of a word.
// The chip-per-point scheme, the bit multiplexer with its counter and the
// interleaved real/imaginary order follow the original machine; the address
// layout (24 consecutive bits per word) and the handshake are this design's.
module corner_turn
  import pfft_pkg::*;
#(
  parameter int N  = 9,    // points of the transform = RAM chips
  parameter int AW = 12    // RAM chip address width (4K x 1)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  output logic                    in_ready,
  input  cplx_t                   in_data,
  input  logic [$clog2(N)-1:0]    in_point,
  input  logic [AW-1:0]           in_addr,
  output logic                    wr_en,
  output logic [$clog2(N)-1:0]    wr_point,
  output logic [AW-1:0]           wr_addr,
  output logic                    wr_bit,
  output logic                    word_done
);
  localparam int CW = $clog2(SLICES);

  logic              busy;
  logic [CW-1:0]     cnt;
  logic [SLICES-1:0] word_q;     // interleaved r0,i0,r1,i1,... (bit 0 = r0)
  logic [AW-1:0]     base_q;
  logic [$clog2(N)-1:0] point_q;
  logic              last;

  assign last     = busy && (cnt == CW'(SLICES - 1));
  assign in_ready = !busy || last;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy    <= 1'b0;
      cnt     <= '0;
      word_q  <= '0;
      base_q  <= '0;
      point_q <= '0;
    end else begin
      if (in_valid && in_ready) begin
        busy    <= 1'b1;
        cnt     <= '0;
        point_q <= in_point;
        base_q  <= AW'(in_addr * SLICES);
        for (int b = 0; b < B; b++) begin
          word_q[2*b]   <= in_data.re[b];
          word_q[2*b+1] <= in_data.im[b];
        end
      end else if (last) begin
        busy <= 1'b0;
      end else if (busy) begin
        cnt <= cnt + 1'b1;
      end
    end
  end

  // 2B:1 bit multiplexer and chip select
  assign wr_en     = busy;
  assign wr_bit    = word_q[cnt];
  assign wr_point  = point_q;
  assign wr_addr   = base_q + AW'(cnt);
  assign word_done = last;
endmodule
