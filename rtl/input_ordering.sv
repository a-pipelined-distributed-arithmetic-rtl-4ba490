// input_ordering: input address counter and EPROM address translator.
//
// Samples arrive in natural order n = 0 .. FRAME-1. An address counter counts
// them and a translation table (the EPROM, filled at elaboration) gives, for
// each n, where the first (8-point) stage must store it:
//   n = (63*n1 + 56*n2 + 72*n3) mod 504  ->  point n1, word address n2*7 + n3
// The first stage reads its transforms with a stride of 9, so transform t
// covers (n2, n3) = (t mod 9, t div 9), which the second stage expects.
//
// Interface: valid/ready stream in, the same stream with point and address out
// (combinational). The counter advances on every accepted sample and wraps at
// the end of a frame; in_first marks sample 0 of a frame.
// Counter plus EPROM address translation follows the original machine; the
// index map and the computed table contents are this design's.
module input_ordering
  import pfft_pkg::*;
#(
  parameter int AW = 12
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  output logic                  in_ready,
  input  cplx_t                 in_data,
  output logic                  in_first,
  output logic                  out_valid,
  input  logic                  out_ready,
  output cplx_t                 out_data,
  output logic [$clog2(N1)-1:0] out_point,
  output logic [AW-1:0]         out_addr
);
  localparam int PW = $clog2(N1);
  localparam int NW = $clog2(FRAME);
  typedef logic [PW+AW-1:0] eprom_t [FRAME];

  function automatic eprom_t make_eprom();
    eprom_t t;
    for (int n1 = 0; n1 < N1; n1++)
      for (int n2 = 0; n2 < N2; n2++)
        for (int n3 = 0; n3 < N3; n3++)
          t[in_index(n1, n2, n3)] = {PW'(n1), AW'(n2 * N3 + n3)};
    return t;
  endfunction

  localparam eprom_t EPROM = make_eprom();

  logic [NW-1:0] n;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                       n <= '0;
    else if (in_valid && out_ready)   n <= (n == NW'(FRAME - 1)) ? '0 : n + 1'b1;
  end

  assign out_valid = in_valid;
  assign in_ready  = out_ready;
  assign out_data  = in_data;
  assign in_first  = (n == '0);
  assign {out_point, out_addr} = EPROM[n];
endmodule
