// stage_link: write-address counters between two short transform stages.
//
// The previous stage (length NPREV) delivers its outputs transform by
// transform, NPREV points each. The NPREV outputs of one transform go to one
// RAM chip (point) of the next stage (length NCUR): the first transform to
// chip 0, the next to chip 1, and so on, cycling through the NCUR chips; each
// chip is filled at consecutive word addresses. So word number s of a frame
// (t = s div NPREV, k = s mod NPREV) is written to
//   point = t mod NCUR,  addr = (t div NCUR) * NPREV + k.
// This is done with three counters (k, point, address base); no arithmetic on
// s is needed.
//
// Interface: valid/ready stream in, the same stream with point and address out
// (combinational pass-through of valid, ready and data). Counters advance on
// every accepted word and wrap at the end of a frame (NFRAME words).
// That the N outputs of one transform fill one chip of the next stage follows
// the original machine; the counters that do it are this design's.
module stage_link
  import pfft_pkg::*;
#(
  parameter int NPREV  = 8,
  parameter int NCUR   = 9,
  parameter int NFRAME = FRAME,
  parameter int AW     = 12
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  output logic                    in_ready,
  input  cplx_t                   in_data,
  output logic                    out_valid,
  input  logic                    out_ready,
  output cplx_t                   out_data,
  output logic [$clog2(NCUR)-1:0] out_point,
  output logic [AW-1:0]           out_addr
);
  localparam int KW    = $clog2(NPREV);
  localparam int PW    = $clog2(NCUR);
  localparam int DEPTH = NFRAME / NCUR;    // words per chip per frame

  logic [KW-1:0] kc;
  logic [PW-1:0] pc;
  logic [AW-1:0] base;

  assign out_valid = in_valid;
  assign in_ready  = out_ready;
  assign out_data  = in_data;
  assign out_point = pc;
  assign out_addr  = base + AW'(kc);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      kc   <= '0;
      pc   <= '0;
      base <= '0;
    end else if (in_valid && out_ready) begin
      if (kc != KW'(NPREV - 1)) begin
        kc <= kc + 1'b1;
      end else begin
        kc <= '0;
        if (pc != PW'(NCUR - 1)) begin
          pc <= pc + 1'b1;
        end else begin
          pc   <= '0;
          base <= (base == AW'(DEPTH - NPREV)) ? '0 : base + AW'(NPREV);
        end
      end
    end
  end
endmodule
