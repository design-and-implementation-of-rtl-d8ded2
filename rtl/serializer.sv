// serializer: N:1 (default 8:1) serializer built as a tree of double-edge
// 2:1 cells (detff), the transmit half of a SerDes link.
//
// The tree has S = log2(N) levels. Level S-1 is a single cell clocked by
// clk (625 MHz); each level below runs at half the clock of the level
// above (312.5 MHz, then 156.25 MHz for N = 8) and has twice as many cells.
// Every cell sends two bits per clock period, one while its clock is low
// and one while it is high, so the serial output carries 2 bits per clk
// period: 1.25 Gbit/s at 625 MHz, one parallel word every N/2 clk periods.
// Cell j of level l takes its first input from cell 2j and its second from
// cell 2j+1 of level l-1; the first level takes bits of din in bit-reversed
// cell order (see serdes_pkg::bit_rev) so that sout carries din[0] (D1)
// first and din[N-1] last.
//
// Clocks: the slower clocks are made by a chain of divide-by-two toggle
// flip-flops (clk_div2). Each divided clock rises on a rising edge of its
// source, so a cell always samples the cells below it at one of their
// clock edges, where their output has been stable for half a period.
// word_clk (the level-0 clock, clk/(N/2)) is brought out: din is sampled on
// its rising edge and must be stable around it. stage_clk brings out every
// level's clock, stage_clk[S-1] being clk itself.
//
// Timing (N = 8, T = clk period): the word captured at a rising edge of
// word_clk at time t0 appears on sout as D1 over [t0 + 6.5T, t0 + 7T),
// D2 over [t0 + 7T, t0 + 7.5T), ..., D8 over [t0 + 10T, t0 + 10.5T);
// words follow back to back with no gap.
//
// The tree of 2:1 cells and the three clock frequencies follow the
// document; the divider chain, the bit-reversed input mapping that yields
// D1..D8 in order, the reset and the word_clk output are this design's own.
module serializer
  import serdes_pkg::*;
#(
  parameter int unsigned N = SER_WIDTH
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [N-1:0]         din,
  output logic                 word_clk,
  output logic [$clog2(N)-1:0] stage_clk,
  output logic                 sout
);

  localparam int unsigned S = $clog2(N);

  initial begin
    assert (N >= 2 && (1 << S) == N)
      else $error("serializer: N must be a power of two, at least 2");
  end

  // Clock of every level: lvl_clk[S-1] = clk, lvl_clk[l] = lvl_clk[l+1] / 2.
  logic [S-1:0] lvl_clk;
  assign lvl_clk[S-1] = clk;

  for (genvar l = S - 2; l >= 0; l--) begin : g_div
    clk_div2 u_div (.clk_in(lvl_clk[l+1]), .rst_n(rst_n), .clk_out(lvl_clk[l]));
  end

  // Outputs of the cells of each level; level l has N >> (l+1) cells.
  logic [N/2-1:0] lvl_q [S];

  for (genvar l = 0; l < S; l++) begin : g_lvl
    for (genvar j = 0; j < (N >> (l + 1)); j++) begin : g_cell
      if (l == 0) begin : g_first
        localparam int unsigned P = bit_rev(j, S - 1);
        detff u_cell (
          .clk  (lvl_clk[l]),
          .rst_n(rst_n),
          .d0   (din[P]),
          .d1   (din[P + N/2]),
          .q    (lvl_q[l][j])
        );
      end else begin : g_inner
        detff u_cell (
          .clk  (lvl_clk[l]),
          .rst_n(rst_n),
          .d0   (lvl_q[l-1][2*j]),
          .d1   (lvl_q[l-1][2*j+1]),
          .q    (lvl_q[l][j])
        );
      end
    end
    // Cells beyond the level's count are absent; tie their slots.
    if ((N >> (l + 1)) < N/2) begin : g_tie
      assign lvl_q[l][N/2-1:(N >> (l + 1))] = '0;
    end
  end

  assign sout      = lvl_q[S-1][0];
  assign word_clk  = lvl_clk[0];
  assign stage_clk = lvl_clk;

endmodule
