// da_rom_lookup: ROM lookup table for an N-point short transform, built from
// SECTIONS smaller section ROMs and a chain of adders.
//
// Because the transform is linear, the table for all N data bits can be split:
// section s looks up the partial sum of points s*SS .. s*SS+SS-1 (SS =
// ceil(N/SECTIONS)) and the section outputs are added. With three sections and
// N = 9 each ROM has 3 + 5 = 8 address bits (256 words) instead of one ROM of
// 9 + 5 = 14 address bits. The address of every section is the word select
// {k, part} plus that section's bits of the slice.
//
// Purely combinational; the caller latches q.
// Three sections and the adder chain follow the original machine; the 3/3/2
// and 3/3/1 splits for N = 8 and 7 are this design's.
module da_rom_lookup
  import pfft_pkg::*;
#(
  parameter int N        = 9,
  parameter int SECTIONS = 3,
  parameter int W        = B
) (
  input  logic [N-1:0]          slice,   // bit of every input point
  input  logic [$clog2(N)-1:0]  k,
  input  logic                  part,
  output logic signed [W-1:0]   q
);
  localparam int SS = (N + SECTIONS - 1) / SECTIONS;

  logic [SECTIONS*SS-1:0]  xs;
  logic signed [W-1:0]     rq [SECTIONS];

  assign xs = (SECTIONS*SS)'(slice);   // missing points read as zero

  for (genvar s = 0; s < SECTIONS; s++) begin : g_sec
    da_rom_section #(.N(N), .SS(SS), .SEC(s), .W(W)) u_rom (
      .k    (k),
      .part (part),
      .x    (xs[s*SS +: SS]),
      .q    (rq[s])
    );
  end

  always_comb begin
    q = rq[0];
    for (int s = 1; s < SECTIONS; s++) q = q + rq[s];
  end
endmodule
