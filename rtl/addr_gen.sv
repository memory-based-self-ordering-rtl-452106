// addr_gen: self-ordering address generator and sequencer of the FFT.
//
// Counters: a stage counter s (0 .. S-1, S = log2 N) and a PE counter b of
// S-1 bits that counts the N/2 butterflies of a stage, one per clock. The
// counter value is turned into the two read addresses R0/R1 of the butterfly
// and, for stages before int(S/2), into bit-swapped write addresses W0/W1:
//   1. if s != S-1: invert counter bit INV_BIT   (orders pairs across a stage
//                                                  boundary)
//   2. if s != S-1: swap b1 with b_SH             (b1 pairs consecutive
//                                                  butterflies onto the
//                                                  block-select bits)
//   3. if s <  SH : swap b0 with b_s              (pairwise processing of the
//                                                  swapped stages)
//   4. insert 0 / 1 at the butterfly bit position -> R0 / R1
//   5. if s <  SH : swap address bits S-1-s and s  -> W0 / W1, else W = R
// The write addresses are delayed two clocks to line up with the PE output.
// Steps 1-5 follow the original design's address generation flow. Two
// points are this design's own, both checked by exhaustive schedule simulation for
// N = 32 .. 8192: the butterfly bit is S-1-s for s <= SH but s for s > SH
// (after the first SH stages have reversed the addresses, the remaining DIF
// stages pair on bit s), and the inverted counter bit is max(2, SH-1) (bit 2
// for N = 32 and 128, a higher bit for larger N; with bit 2 alone, the first
// two reads of stage SH collide with pending writes for N >= 512).
//
// The last stage (s = S-1) runs in plain counter order. Its results are not
// written back: they leave on the output ports, and new input samples are
// written into the addresses the stage reads in the same clock (read-first
// memory ports). So ird marks the N/2 clocks in which the input pair
// x[k], x[k+N/2] must be present (k = 0, 1, ... in order), and ord, two clocks
// later, marks the output pair X[k], X[k+N/2]. After reset the sequencer
// starts in the last stage with ord held low, which loads the first frame.
// From then on a new frame starts every S*N/2 clocks with no idle cycle.
//
// Interface, all outputs valid in the cycle shown:
//   rd_addr0/1, rd_load, ird, tw_exp, stage  cycle t (butterfly read)
//   wr_addr0/1, wr_en, ord                   cycle t+2 (PE result ready)
// Only transform lengths with an odd number of address bits are supported,
// as in the original description; an even S stops elaboration.
module addr_gen #(
  parameter int N = 2048
) (
  input  logic                      clk,
  input  logic                      rst_n,
  output logic [$clog2(N)-1:0]      rd_addr0,
  output logic [$clog2(N)-1:0]      rd_addr1,
  output logic                      rd_load,
  output logic                      ird,
  output logic [$clog2(N)-2:0]      tw_exp,
  output logic [$clog2($clog2(N))-1:0] stage,
  output logic [$clog2(N)-1:0]      wr_addr0,
  output logic [$clog2(N)-1:0]      wr_addr1,
  output logic                      wr_en,
  output logic                      ord
);
  import fft_pkg::*;

  localparam int S       = $clog2(N);
  localparam int SH      = S / 2;
  localparam int SW      = $clog2(S);
  localparam int INV_BIT = (SH - 1 > 2) ? SH - 1 : 2;

  if (S % 2 == 0 || S < 5) begin : g_bad_size
    $error("addr_gen: N must be 2^S with S odd and S >= 5");
  end

  logic [SW-1:0]  s_q;
  logic [S-2:0]   cnt_q;
  logic           first_q;
  logic           last;

  assign last  = (s_q == SW'(S - 1));
  assign stage = s_q;

  // stage / PE counters
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_q     <= SW'(S - 1);
      cnt_q   <= '0;
      first_q <= 1'b1;
    end else begin
      cnt_q <= cnt_q + 1'b1;
      if (&cnt_q) begin
        if (last) begin
          s_q     <= '0;
          first_q <= 1'b0;
        end else begin
          s_q <= s_q + 1'b1;
        end
      end
    end
  end

  // address arithmetic of one butterfly
  word_t        b, r0, r1, lg;
  logic [S-1:0] w0, w1;
  int    pos;
  always_comb begin
    b = word_t'(cnt_q);
    if (!last) begin
      b[INV_BIT] = ~b[INV_BIT];
      b = swap_bits(b, 1, SH);
    end
    if (int'(s_q) < SH) b = swap_bits(b, 0, int'(s_q));
    pos = (int'(s_q) <= SH) ? S - 1 - int'(s_q) : int'(s_q);
    r0  = insert_bit(b, pos, 1'b0);
    r1  = insert_bit(b, pos, 1'b1);
    if (int'(s_q) < SH) begin
      w0 = S'(swap_bits(r0, S - 1 - int'(s_q), int'(s_q)));
      w1 = S'(swap_bits(r1, S - 1 - int'(s_q), int'(s_q)));
    end else begin
      w0 = S'(r0);
      w1 = S'(r1);
    end
    // undo the reversal done so far to get the in-place DIF position, whose
    // low S-1-s bits give the twiddle index
    lg = r0;
    for (int j = 0; j < SH; j++)
      if (j < int'(s_q)) lg = swap_bits(lg, j, S - 1 - j);
    lg = (lg & ((word_t'(1) << (S - 1 - int'(s_q))) - 1)) << int'(s_q);
  end

  assign rd_addr0 = r0[S-1:0];
  assign rd_addr1 = r1[S-1:0];
  assign rd_load  = last;
  assign ird      = last;
  assign tw_exp   = lg[S-2:0];

  // two-clock delay of the write side (address pipeline registers)
  logic [S-1:0] w0_d1, w1_d1;
  logic         we_d1, ord_d1;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      w0_d1 <= '0; w1_d1 <= '0; we_d1 <= 1'b0; ord_d1 <= 1'b0;
      wr_addr0 <= '0; wr_addr1 <= '0; wr_en <= 1'b0; ord <= 1'b0;
    end else begin
      w0_d1    <= w0;
      w1_d1    <= w1;
      we_d1    <= !last;
      ord_d1   <= last && !first_q;
      wr_addr0 <= w0_d1;
      wr_addr1 <= w1_d1;
      wr_en    <= we_d1;
      ord      <= ord_d1;
    end
  end

endmodule
