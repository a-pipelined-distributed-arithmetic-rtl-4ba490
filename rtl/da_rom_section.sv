// da_rom_section: one section ROM of the distributed-arithmetic lookup table.
//
// The N input points of the short transform are split into sections of SS
// points; section SEC covers points n = SEC*SS .. SEC*SS+SS-1 (points beyond
// N-1 do not exist and count as zero). For a bit slice x of those points, an
// output point k and a part select (0 = real, 1 = imaginary) the ROM holds
//   round( 2^ROM_FRAC * sum_{j : x[j]=1} Re/Im( W_N^((SEC*SS+j)*k) ) )
// i.e. the value of the transform with all other inputs zero. Addresses with
// k >= N read 0.
//
// Address = {k, part, x}: ceil(log2 2N) + SS bits (256 words for N = 9, SS = 3).
// The table is computed at elaboration; the read is combinational (the
// pipeline latch follows the adders, as in a bipolar ROM stage).
// Sectioning, the 256-word size for N = 9 and the table formula follow the
// original machine; the 7-bit fraction scaling and the computed (rather than
// programmed) contents are this design's.
module da_rom_section
  import pfft_pkg::*;
#(
  parameter int N   = 9,
  parameter int SS  = 3,    // points per section
  parameter int SEC = 0,    // section number
  parameter int W   = B     // ROM word width
) (
  input  logic [$clog2(N)-1:0] k,
  input  logic                 part,
  input  logic [SS-1:0]        x,
  output logic signed [W-1:0]  q
);
  localparam int KW    = $clog2(N);
  localparam int DEPTH = 2 ** (KW + 1 + SS);
  typedef logic signed [W-1:0] rom_t [DEPTH];

  function automatic rom_t make_rom();
    rom_t t;
    for (int a = 0; a < DEPTH; a++) begin
      int  kk, n;
      bit  pp;
      real s;
      kk = a >> (SS + 1);
      pp = 1'((a >> SS) & 1);
      s  = 0.0;
      if (kk < N) begin
        for (int j = 0; j < SS; j++) begin
          n = SEC * SS + j;
          if (((a >> j) & 1) == 1 && n < N) s += kernel(n, kk, N, pp);
        end
      end
      t[a] = W'(int'($floor(s * real'(2 ** ROM_FRAC) + 0.5)));
    end
    return t;
  endfunction

  localparam rom_t ROM = make_rom();

  assign q = ROM[{k, part, x}];
endmodule
