// pfft_pkg: constants, the complex word type and the elaboration-time table
// generators shared by the 504-point prime factor FFT processor.
//
// Data are complex words made of two B-bit two's complement integers (real and
// imaginary part), B = 12. A frame is 504 points, factored as 8 x 9 x 7; the
// three short transforms are computed in that order.
//
// The short-transform ROMs hold precomputed partial sums of the DFT kernel
// W_N^(nk) with W_N = exp(+j*2*pi/N) (KERNEL_SIGN = +1.0; set it to -1.0 for
// the exp(-j...) convention). Every stage divides its result by 2^GROWTH_SHIFT
// (16) so that the worst-case output of any of the three stages still fits in
// B bits: |Re X| <= 2048 * N * sqrt(2) <= 2048 * 16 for N <= 9. ROM words
// therefore carry ROM_FRAC = B-1-GROWTH_SHIFT = 7 fraction bits.
//
// The input map is the Ruritanian map n = (63*n1 + 56*n2 + 72*n3) mod 504 and
// the output map is the Chinese remainder map (k1,k2,k3) = (k mod 8, k mod 9,
// k mod 7); with these maps each stage is a plain DFT with no twiddle factors
// between stages, so the ROM contents do not depend on the frame length.
// Word size, frame length and factors follow the original machine; the
// scaling, the index maps and the computed tables are this design's.
package pfft_pkg;

  localparam int B            = 12;     // bits per real or imaginary part
  localparam int FRAME        = 504;    // points per transform frame
  localparam int N1           = 8;      // first short transform
  localparam int N2           = 9;      // second short transform
  localparam int N3           = 7;      // third short transform
  localparam int SLICES       = 2 * B;  // bit slices per complex word (r0,i0,r1,i1,...)
  localparam int GROWTH_SHIFT = 4;      // each stage outputs X / 16
  localparam int ROM_FRAC     = B - 1 - GROWTH_SHIFT;
  localparam real KERNEL_SIGN = 1.0;
  localparam real PI          = 3.14159265358979323846;

  typedef struct packed {
    logic signed [B-1:0] re;
    logic signed [B-1:0] im;
  } cplx_t;

  // Real (part=0) or imaginary (part=1) part of W_N^(n*k).
  function automatic real kernel(int n, int k, int nn, bit part);
    real ang;
    ang = KERNEL_SIGN * 2.0 * PI * real'((n * k) % nn) / real'(nn);
    return part ? $sin(ang) : $cos(ang);
  endfunction

  // Ruritanian input map: position of (n1,n2,n3) in the natural sample order.
  function automatic int in_index(int n1, int n2, int n3);
    return (N2 * N3 * n1 + N1 * N3 * n2 + N1 * N2 * n3) % FRAME;
  endfunction

  // Position of output bin k in the order the last stage produces it:
  // s = ((k1*N2 + k2)*N3 + k3) with (k1,k2,k3) = (k mod N1, k mod N2, k mod N3).
  function automatic int out_seq(int k);
    return ((k % N1) * N2 + (k % N2)) * N3 + (k % N3);
  endfunction

endpackage
