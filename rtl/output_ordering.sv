// output_ordering: double-buffered output memory with EPROM read-address
// translation.
//
// The last (7-point) stage produces the frame in the order
//   s = ((k1*9 + k2)*7 + k3),  (k1, k2, k3) = (k mod 8, k mod 9, k mod 7)
// Those words are written at consecutive addresses s of the write bank. Once
// a whole frame is in and the previous frame has been read out, the banks
// swap; an address counter k = 0 .. FRAME-1 then reads the frame through a
// translation table (EPROM, filled at elaboration) holding s(k), so bins leave
// in natural order 0 .. 503.
//
// Interface: valid/ready streams. in_ready is low only while a full frame
// waits for the swap. Reads are registered: out_data is loaded from memory
// whenever the output register is empty or being taken. out_last marks bin
// FRAME-1.
// Counter plus EPROM address translation follows the original machine;
// double buffering of the output memory is this design's.
module output_ordering
  import pfft_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  output logic  in_ready,
  input  cplx_t in_data,
  output logic  out_valid,
  input  logic  out_ready,
  output cplx_t out_data,
  output logic  out_last,
  output logic  swap
);
  localparam int NW = $clog2(FRAME);
  localparam int FW = $clog2(FRAME + 1);
  typedef logic [NW-1:0] eprom_t [FRAME];

  function automatic eprom_t make_eprom();
    eprom_t t;
    for (int k = 0; k < FRAME; k++) t[k] = NW'(out_seq(k));
    return t;
  endfunction

  localparam eprom_t EPROM = make_eprom();

  cplx_t         mem [2][FRAME];
  logic          wbank;
  logic [FW-1:0] wcnt;
  logic [NW-1:0] rk;
  logic          rbusy, adv;

  assign in_ready = (wcnt != FW'(FRAME));
  assign swap     = (wcnt == FW'(FRAME)) && !rbusy;
  assign adv      = rbusy && (!out_valid || out_ready);

  always_ff @(posedge clk) begin
    if (in_valid && in_ready) mem[wbank][NW'(wcnt)] <= in_data;
    if (adv) out_data <= mem[!wbank][EPROM[rk]];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wbank     <= 1'b0;
      wcnt      <= '0;
      rk        <= '0;
      rbusy     <= 1'b0;
      out_valid <= 1'b0;
      out_last  <= 1'b0;
    end else begin
      if (swap) begin
        wbank <= !wbank;
        wcnt  <= '0;
        rbusy <= 1'b1;
        rk    <= '0;
      end else if (in_valid && in_ready) begin
        wcnt <= wcnt + 1'b1;
      end
      if (adv) begin
        out_valid <= 1'b1;
        out_last  <= (rk == NW'(FRAME - 1));
        rk        <= (rk == NW'(FRAME - 1)) ? '0 : rk + 1'b1;
        if (rk == NW'(FRAME - 1)) rbusy <= 1'b0;
      end else if (out_ready) begin
        out_valid <= 1'b0;
      end
    end
  end
endmodule
