// short_transform: one N-point short transform module of the prime factor FFT,
// computed by distributed arithmetic with ROM lookup.
//
// Data path (one stage of the pipelined processor):
//   corner_turn -> double_buffer_ram -> pipeline latch -> da_rom_lookup
//     -> da_accumulator (pipeline latch, add/subtract, shifter and latch)
// Words of a frame (FRAME complex words, T = FRAME/N transforms of N points)
// arrive with their point number (RAM chip) and word address and are written
// bit by bit into the write bank. When the whole frame is in and the read side
// has issued the last read of the previous frame, the banks swap, on that very
// cycle, so the read side never idles between frames. The read side then computes,
// for each transform t and each output word {k, part}, the sum of 2B partial
// sums, one bit slice per cycle: one B-bit word every 2B = 24 cycles, one
// complex output point every 48 cycles. Output points leave in the order
// (t, k) with t the read order set by read_ctrl's stride P.
// Each output is X_k / 2^GROWTH_SHIFT, X_k = sum_n x_n W_N^(nk).
//
// Interfaces: input and output are valid/ready streams. in_ready is low while
// a word is being written (2B cycles per word) and while a complete frame waits
// for the swap. If the output point is not taken (out_valid && !out_ready) the
// whole read pipeline stalls (stall high) and resumes without loss.
// Latency: the first output point is valid 53 cycles after the swap.
// The block structure follows the original machine; handshakes, the swap
// rule, the stall and the extra register for the RAM access are this design's.
module short_transform
  import pfft_pkg::*;
#(
  parameter int N        = 9,
  parameter int P        = 1,          // length of the next stage (read stride)
  parameter int NFRAME   = FRAME,      // complex words per frame
  parameter int AW       = 12,         // 4K x 1 RAM chips
  parameter int SECTIONS = 3,
  parameter int W        = B
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  output logic                 in_ready,
  input  cplx_t                in_data,
  input  logic [$clog2(N)-1:0] in_point,
  input  logic [AW-1:0]        in_addr,
  output logic                 out_valid,
  input  logic                 out_ready,
  output cplx_t                out_data,
  output logic                 bank,       // bank being written
  output logic                 swap,       // pulses when the banks swap
  output logic                 stall       // read pipeline frozen by the output
);
  localparam int T  = NFRAME / N;
  localparam int KW = $clog2(N);
  localparam int CW = $clog2(SLICES);
  localparam int FW = $clog2(NFRAME + 1);

  // ---------------- write side ----------------
  logic          ct_ready, ct_valid;
  logic          wr_en, wr_bit, word_done;
  logic [KW-1:0] wr_point;
  logic [AW-1:0] wr_addr;
  logic [FW-1:0] taken_cnt, done_cnt;

  assign ct_valid = in_valid && (taken_cnt != FW'(NFRAME));
  assign in_ready = ct_ready && (taken_cnt != FW'(NFRAME));

  corner_turn #(.N(N), .AW(AW)) u_ct (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (ct_valid),
    .in_ready  (ct_ready),
    .in_data   (in_data),
    .in_point  (in_point),
    .in_addr   (in_addr),
    .wr_en     (wr_en),
    .wr_point  (wr_point),
    .wr_addr   (wr_addr),
    .wr_bit    (wr_bit),
    .word_done (word_done)
  );

  // ---------------- read side control ----------------
  logic          en, rc_busy, rd_en, rc_part, rc_done;
  logic [AW-1:0] rd_addr;
  logic [KW-1:0] rc_k;
  logic [CW-1:0] rc_c;
  logic [KW:0]   rc_wsel;

  assign en    = !(out_valid && !out_ready);
  assign stall = !en;
  assign swap  = (done_cnt == FW'(NFRAME)) && (!rc_busy || rc_done);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      taken_cnt <= '0;
      done_cnt  <= '0;
      bank      <= 1'b0;
    end else if (swap) begin
      taken_cnt <= '0;
      done_cnt  <= '0;
      bank      <= !bank;
    end else begin
      if (in_valid && in_ready) taken_cnt <= taken_cnt + 1'b1;
      if (word_done)            done_cnt  <= done_cnt + 1'b1;
    end
  end

  read_ctrl #(.N(N), .T(T), .P(P), .AW(AW)) u_rc (
    .clk     (clk),
    .rst_n   (rst_n),
    .start   (swap),
    .en      (en),
    .busy    (rc_busy),
    .rd_en   (rd_en),
    .rd_addr (rd_addr),
    .k       (rc_k),
    .part    (rc_part),
    .c       (rc_c),
    .wsel    (rc_wsel),
    .done    (rc_done)
  );

  logic [N-1:0] rd_slice;

  double_buffer_ram #(.N(N), .AW(AW)) u_dbuf (
    .clk      (clk),
    .wr_bank  (bank),
    .wr_en    (wr_en),
    .wr_point (wr_point),
    .wr_addr  (wr_addr),
    .wr_bit   (wr_bit),
    .rd_en    (rd_en),
    .rd_addr  (rd_addr),
    .rd_slice (rd_slice)
  );

  // control travelling with the RAM read (RAM output is registered)
  logic          s1_v, s1_part;
  logic [KW-1:0] s1_k;
  logic [CW-1:0] s1_c;
  // pipeline latch between RAM and ROM: bit slice plus word select
  logic          s2_v, s2_part;
  logic [KW-1:0] s2_k;
  logic [CW-1:0] s2_c;
  logic [N-1:0]  s2_slice;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_v <= 1'b0; s1_part <= 1'b0; s1_k <= '0; s1_c <= '0;
      s2_v <= 1'b0; s2_part <= 1'b0; s2_k <= '0; s2_c <= '0; s2_slice <= '0;
    end else if (en) begin
      s1_v     <= rd_en;
      s1_part  <= rc_part;
      s1_k     <= rc_k;
      s1_c     <= rc_c;
      s2_v     <= s1_v;
      s2_part  <= s1_part;
      s2_k     <= s1_k;
      s2_c     <= s1_c;
      s2_slice <= rd_slice;
    end
  end

  // ROM real/imag select: a real input slice gives Re (real output) or Im
  // (imaginary output); an imaginary input slice the other one.
  logic signed [W-1:0] rom_q;

  da_rom_lookup #(.N(N), .SECTIONS(SECTIONS), .W(W)) u_rom (
    .slice (s2_slice),
    .k     (s2_k),
    .part  (s2_part ^ s2_c[0]),
    .q     (rom_q)
  );

  logic               res_valid, res_part;
  logic signed [B-1:0] res;

  da_accumulator #(.W(W)) u_acc (
    .clk       (clk),
    .rst_n     (rst_n),
    .en        (en),
    .in_valid  (s2_v),
    .in_p      (rom_q),
    .in_c      (s2_c),
    .in_part   (s2_part),
    .res_valid (res_valid),
    .res_part  (res_part),
    .res       (res)
  );

  // ---------------- output register ----------------
  logic signed [B-1:0] re_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      re_q      <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      if (res_valid && !res_part) re_q <= res;
      if (res_valid && res_part) begin
        out_valid <= 1'b1;
        out_data  <= '{re: re_q, im: res};
      end else if (out_ready) begin
        out_valid <= 1'b0;
      end
    end
  end

  // the write side never overruns a frame, the read side never starts twice
  assert property (@(posedge clk) disable iff (!rst_n) !(swap && rc_busy && !rc_done));
  assert property (@(posedge clk) disable iff (!rst_n) !(word_done && done_cnt == FW'(NFRAME)));
  logic unused;
  assign unused = ^rc_wsel;
endmodule
