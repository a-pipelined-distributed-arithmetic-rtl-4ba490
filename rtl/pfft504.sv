// pfft504: pipelined 504-point prime factor FFT processor built from
// distributed-arithmetic short transform modules.
//
//   samples -> input_ordering -> 8-point -> stage_link -> 9-point
//           -> stage_link -> 7-point -> output_ordering -> transform
//
// A 504-point DFT is computed as three sets of short DFTs of mutually prime
// lengths 8, 9 and 7 (Good-Thomas / prime factor algorithm): the input is
// permuted by the Ruritanian map, each stage does all its short transforms
// with no twiddle multiplications in between, and the output is permuted by
// the Chinese remainder map. Each short transform module holds a whole frame
// in a double buffer, so frames stream through the four buffers (three stages
// and the output memory) and up to four frames are in flight.
//
// Each stage computes one complex point every 48 clock cycles (2 x 24 bit
// slices), so the processor accepts one complex sample per 48 cycles in steady
// state (104 kHz at a 200 ns clock) and produces
//   out = X_k / 4096,  X_k = sum_n x_n exp(+j 2 pi n k / 504)
// (each stage divides by 16; see pfft_pkg for the sign convention).
//
// Interfaces: valid/ready streams of complex 12+12-bit words. out_last marks
// bin 503 of a frame. Status: swap[i] pulses when buffer i (0..2 stages,
// 3 output memory) takes a new frame; stall[i] is high while stage i's read
// pipeline is held by a full output register.
// The stage order and the 48-cycle rate follow the original machine; the
// stream interfaces and the status outputs are this design's.
module pfft504
  import pfft_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  output logic       in_ready,
  input  cplx_t      in_data,
  output logic       out_valid,
  input  logic       out_ready,
  output cplx_t      out_data,
  output logic       out_last,
  output logic [3:0] swap,
  output logic [2:0] stall
);
  localparam int AW = 12;

  // input ordering -> 8-point stage
  logic                  a_valid, a_ready;
  cplx_t                 a_data;
  logic [$clog2(N1)-1:0] a_point;
  logic [AW-1:0]         a_addr;
  logic                  first_unused;

  input_ordering #(.AW(AW)) u_in (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (in_valid),
    .in_ready  (in_ready),
    .in_data   (in_data),
    .in_first  (first_unused),
    .out_valid (a_valid),
    .out_ready (a_ready),
    .out_data  (a_data),
    .out_point (a_point),
    .out_addr  (a_addr)
  );

  logic  b_valid, b_ready;
  cplx_t b_data;
  logic [2:0] bank_unused;

  short_transform #(.N(N1), .P(N2), .AW(AW)) u_st8 (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (a_valid),
    .in_ready  (a_ready),
    .in_data   (a_data),
    .in_point  (a_point),
    .in_addr   (a_addr),
    .out_valid (b_valid),
    .out_ready (b_ready),
    .out_data  (b_data),
    .bank      (bank_unused[0]),
    .swap      (swap[0]),
    .stall     (stall[0])
  );

  logic                  c_valid, c_ready;
  cplx_t                 c_data;
  logic [$clog2(N2)-1:0] c_point;
  logic [AW-1:0]         c_addr;

  stage_link #(.NPREV(N1), .NCUR(N2), .AW(AW)) u_l89 (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (b_valid),
    .in_ready  (b_ready),
    .in_data   (b_data),
    .out_valid (c_valid),
    .out_ready (c_ready),
    .out_data  (c_data),
    .out_point (c_point),
    .out_addr  (c_addr)
  );

  logic  d_valid, d_ready;
  cplx_t d_data;

  short_transform #(.N(N2), .P(N3), .AW(AW)) u_st9 (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (c_valid),
    .in_ready  (c_ready),
    .in_data   (c_data),
    .in_point  (c_point),
    .in_addr   (c_addr),
    .out_valid (d_valid),
    .out_ready (d_ready),
    .out_data  (d_data),
    .bank      (bank_unused[1]),
    .swap      (swap[1]),
    .stall     (stall[1])
  );

  logic                  e_valid, e_ready;
  cplx_t                 e_data;
  logic [$clog2(N3)-1:0] e_point;
  logic [AW-1:0]         e_addr;

  stage_link #(.NPREV(N2), .NCUR(N3), .AW(AW)) u_l97 (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (d_valid),
    .in_ready  (d_ready),
    .in_data   (d_data),
    .out_valid (e_valid),
    .out_ready (e_ready),
    .out_data  (e_data),
    .out_point (e_point),
    .out_addr  (e_addr)
  );

  logic  f_valid, f_ready;
  cplx_t f_data;

  short_transform #(.N(N3), .P(1), .AW(AW)) u_st7 (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (e_valid),
    .in_ready  (e_ready),
    .in_data   (e_data),
    .in_point  (e_point),
    .in_addr   (e_addr),
    .out_valid (f_valid),
    .out_ready (f_ready),
    .out_data  (f_data),
    .bank      (bank_unused[2]),
    .swap      (swap[2]),
    .stall     (stall[2])
  );

  output_ordering u_out (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (f_valid),
    .in_ready  (f_ready),
    .in_data   (f_data),
    .out_valid (out_valid),
    .out_ready (out_ready),
    .out_data  (out_data),
    .out_last  (out_last),
    .swap      (swap[3])
  );

  logic unused;
  assign unused = ^{first_unused, bank_unused};
endmodule
