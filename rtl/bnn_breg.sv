// Bridge register (BREG) shared by a vertically adjacent pair of PEs.
//
// The register sits between an upper and a lower PE and both read it
// directly. It holds one K x K x d kernel slice, the tag that goes with it,
// and K+1 rows of input data, COLS columns wide and d channels deep. The
// upper PE uses rows 0..K-1 and the lower PE rows 1..K of the first K
// columns, so the K-1 rows both need are stored once instead of twice.
// Sharing the kernel between the pair and the overlapping input rows is what
// halves the kernel register bits and trims the input register bits compared
// with private PE registers.
//
// Data moves through a row of BREGs from the feed side one column per clock
// cycle. A BREG with DROP=1 takes its neighbour's contents minus the first
// input column (that column was only needed by the neighbour's PEs); the
// first BREG of a row (DROP=0) loads a full window from the feed. ld_win and
// ld_k gate the two loads so the first BREG can keep one input slice while Q
// kernel slices pass through it; BREGs further along load on every cycle.
// Every BREG in a row thus carries the same kernel stream one cycle later
// than its neighbour. The shift-left movement, the column counts and the row
// sharing follow the architecture; the load enables and the zero-padded
// fixed-width neighbour bus are this design's choices.
//
// Interface: win_in/k_in/tag_in come from the neighbour (or the feed),
// win_q/k_q/tag_q go to the next BREG (columns >= COLS read as zero), and
// up_win/dn_win/kern/tag are the PE views. One cycle from load to output.
module bnn_breg
  import bnn_pkg::*;
#(
  parameter int unsigned K    = 3,
  parameter int unsigned DU   = 6,
  parameter int unsigned MAXC = 6,   // width of the neighbour bus in columns
  parameter int unsigned COLS = 6,   // input columns stored here (<= MAXC)
  parameter bit          DROP = 1'b1 // take the neighbour's columns 1..COLS
) (
  input  logic                            clk,
  input  logic                            rst_n,
  input  logic                            ld_win,
  input  logic                            ld_k,
  input  logic [K:0][MAXC-1:0][DU-1:0]    win_in,
  input  logic [K-1:0][K-1:0][DU-1:0]     k_in,
  input  ktag_t                           tag_in,
  output logic [K:0][MAXC-1:0][DU-1:0]    win_q,
  output logic [K-1:0][K-1:0][DU-1:0]     k_q,
  output ktag_t                           tag_q,
  output logic [K-1:0][K-1:0][DU-1:0]     up_win,
  output logic [K-1:0][K-1:0][DU-1:0]     dn_win
);

  logic [K:0][COLS-1:0][DU-1:0] win;

  always_ff @(posedge clk) begin
    if (ld_win) begin
      for (int r = 0; r <= K; r++)
        for (int j = 0; j < COLS; j++)
          win[r][j] <= win_in[r][j + (DROP ? 1 : 0)];
    end
    if (ld_k) k_q <= k_in;
  end

  always_ff @(posedge clk) begin
    if (!rst_n)    tag_q <= '0;
    else if (ld_k) tag_q <= tag_in;
  end

  always_comb begin
    win_q = '0;
    for (int r = 0; r <= K; r++)
      for (int j = 0; j < COLS; j++)
        win_q[r][j] = win[r][j];
    for (int r = 0; r < K; r++)
      for (int j = 0; j < K; j++) begin
        up_win[r][j] = win[r][j];
        dn_win[r][j] = win[r + 1][j];
      end
  end

endmodule
