// read_ctrl: read-side counters of a short transform stage, including the word
// select counter.
//
// For one frame it steps, innermost first, through
//   c    : the 2B bit slices of an output word (0 .. 2B-1, order r0,i0,r1,...),
//   wsel : the word select counter {k, part}: output point k, real (0) or
//          imaginary (1) part; it stays fixed for the 2B cycles of one word,
//   t    : the T transforms of the frame.
// Transform t reads the words stored at word address
//   a(t) = (t mod P) * (T/P) + (t div P)
// in every RAM chip, P being the length of the next stage (1 for the last
// stage); this stride makes the transforms come out in the order the next
// stage needs. The RAM bit address is a(t)*2B + c.
//
// Timing: start begins a frame when idle, or on the cycle of the last read
// (done) so that frames follow with no idle cycle. One read is issued every
// cycle that en is high (en low freezes all counters). done pulses on the
// cycle the last read of the frame is issued; busy falls after it unless start
// was high. rd_en, rd_addr,
// k, part and c all describe the read issued in the current cycle.
// A word select counter held for 24 cycles per word is part of the original
// machine; the order of the output words and the transform stride, which the
// original leaves to "counters", are this design's.
module read_ctrl
  import pfft_pkg::*;
#(
  parameter int N  = 9,
  parameter int T  = FRAME / N,  // transforms per frame
  parameter int P  = 1,          // read stride (length of the next stage)
  parameter int AW = 12
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          start,
  input  logic                          en,
  output logic                          busy,
  output logic                          rd_en,
  output logic [AW-1:0]                 rd_addr,
  output logic [$clog2(N)-1:0]          k,
  output logic                          part,
  output logic [$clog2(SLICES)-1:0]     c,
  output logic [$clog2(2*N)-1:0]        wsel,
  output logic                          done
);
  localparam int Q   = T / P;
  localparam int KW  = $clog2(N);
  localparam int CW  = $clog2(SLICES);
  localparam int PW  = (P > 1) ? $clog2(P) : 1;
  localparam int QW  = (Q > 1) ? $clog2(Q) : 1;

  logic [PW-1:0] tm;   // t mod P
  logic [QW-1:0] td;   // t div P
  logic          last_c, last_word, last_t;

  assign last_c    = (c == CW'(SLICES - 1));
  assign last_word = last_c && part && (k == KW'(N - 1));
  assign last_t    = (tm == PW'(P - 1)) && (td == QW'(Q - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      c    <= '0;
      part <= 1'b0;
      k    <= '0;
      tm   <= '0;
      td   <= '0;
    end else if (!busy) begin
      if (start) begin
        busy <= 1'b1;
        c    <= '0;
        part <= 1'b0;
        k    <= '0;
        tm   <= '0;
        td   <= '0;
      end
    end else if (en) begin
      c <= last_c ? '0 : c + 1'b1;
      if (last_c) begin
        part <= !part;
        if (part) k <= (k == KW'(N - 1)) ? '0 : k + 1'b1;
      end
      if (last_word) begin
        if (last_t) begin
          busy <= start;      // a new frame may follow with no gap
          tm   <= '0;
          td   <= '0;
        end else if (tm == PW'(P - 1)) begin
          tm <= '0;
          td <= td + 1'b1;
        end else begin
          tm <= tm + 1'b1;
        end
      end
    end
  end

  assign rd_en   = busy && en;
  assign rd_addr = AW'((32'(tm) * Q + 32'(td)) * SLICES + 32'(c));
  assign wsel    = {k, part};
  assign done    = rd_en && last_word && last_t;
endmodule
