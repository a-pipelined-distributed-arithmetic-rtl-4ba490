// da_accumulator: pipeline latch, adder/subtractor and shifter-and-latch that
// turn the 2B partial sums of one output word into the word.
//
// Partial sums arrive one per cycle in the slice order r0, i0, r1, i1, ...
// (slice counter c). Bit level b = c/2 is processed as
//   c even: acc = (c == 0 ? 0 : acc >>> 1) +/- p      (shift every two cycles)
//   c odd : acc = acc +/- p
// so after the last slice acc = sum_b (P_r(b) + P_i(b)) * 2^(b-(B-1)).
// The partial sum is subtracted when
//   - it is the sign bit level b = B-1 (two's complement weight -2^(B-1)), or
//   - an imaginary input slice contributes to a real output part
//     (Re(x W) = xr Re W - xi Im W); the two conditions cancel when both hold.
// The accumulator keeps one guard bit above W because the running sum of the
// low bit levels can exceed the range of the final result; the final word is
// its low B bits.
//
// Timing: in_* is captured in the pipeline latch, added on the next edge;
// res_valid pulses (with res and res_part) one cycle after the last slice of a
// word has been added, i.e. 3 cycles after that slice entered. en low freezes
// every register (pipeline stall).
// The latch / add-subtract / shift-and-latch structure, LSB-first order and
// the shift every second cycle follow the original machine; the guard bit,
// the subtract rules written out here and the stall enable are this design's.
module da_accumulator
  import pfft_pkg::*;
#(
  parameter int W = B     // partial sum (ROM) width
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          en,
  input  logic                          in_valid,
  input  logic signed [W-1:0]           in_p,
  input  logic [$clog2(SLICES)-1:0]     in_c,     // slice index 0 .. 2B-1
  input  logic                          in_part,  // output word: 0 real, 1 imaginary
  output logic                          res_valid,
  output logic                          res_part,
  output logic signed [B-1:0]           res
);
  localparam int ACC_W = W + 1;
  localparam int CW    = $clog2(SLICES);

  // pipeline latch
  logic               v_q, sub_q, shift_q, load_q, last_q, part_q;
  logic signed [W-1:0] p_q;
  // shifter and latch
  logic signed [ACC_W-1:0] acc, base, nxt;
  logic                    done_q, done_part_q;

  logic sub_in;
  assign sub_in = (in_c[0] && !in_part) ^ (in_c[CW-1:1] == (CW-1)'(B - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_q     <= 1'b0;
      sub_q   <= 1'b0;
      shift_q <= 1'b0;
      load_q  <= 1'b0;
      last_q  <= 1'b0;
      part_q  <= 1'b0;
      p_q     <= '0;
    end else if (en) begin
      v_q     <= in_valid;
      sub_q   <= sub_in;
      shift_q <= !in_c[0];
      load_q  <= (in_c == '0);
      last_q  <= (in_c == CW'(SLICES - 1));
      part_q  <= in_part;
      p_q     <= in_p;
    end
  end

  always_comb begin
    if (load_q)       base = '0;
    else if (shift_q) base = acc >>> 1;
    else              base = acc;
    nxt = sub_q ? base - ACC_W'(p_q) : base + ACC_W'(p_q);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc         <= '0;
      done_q      <= 1'b0;
      done_part_q <= 1'b0;
    end else if (en) begin
      if (v_q) acc <= nxt;
      done_q      <= v_q && last_q;
      done_part_q <= part_q;
    end
  end

  assign res_valid = done_q && en;
  assign res_part  = done_part_q;
  assign res       = acc[B-1:0];
endmodule
