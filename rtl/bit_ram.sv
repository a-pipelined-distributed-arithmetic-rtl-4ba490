// bit_ram: one 2^AW x 1 static RAM chip (4K x 1 by default), the storage
// element of the corner-turning double buffer. Each chip holds the bits of the
// words that feed one input point of a short transform.
//
// Write: when we is high, bit wd is stored at waddr on the rising clock edge.
// Read: rd is registered; it shows the bit at raddr one cycle after re was high
// and holds its value while re is low. The memory has no reset: every location
// that is read has been written earlier in the same frame.
// The 4K x 1 organisation is that of the original machine; separate read and
// write ports and the registered read are choices of this design.
module bit_ram #(
  parameter int AW = 12
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic          wd,
  input  logic          re,
  input  logic [AW-1:0] raddr,
  output logic          rd
);
  logic mem [2**AW];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wd;
    if (re) rd <= mem[raddr];
  end
endmodule
